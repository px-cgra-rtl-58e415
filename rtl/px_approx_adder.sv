// px_approx_adder: accuracy-configurable carry look-ahead adder.
//
// In exact mode (approx = 0) it is an ordinary W-bit adder with carry in and
// carry out. In approximate mode (approx = 1) the carry into bit i is looked
// ahead over only the WIN bits below it (bits i-WIN .. i-1); a carry that would
// ripple in from further down is dropped. This shortens the longest carry path
// to WIN bits, which is where such an adder saves delay and energy. The carry
// in takes part only for bits 0..WIN, and the carry out is formed from the top
// WIN bits the same way.
//
// The architecture uses the reconfigurable approximate carry look-ahead adder
// of its reference [9], with a carry-chain (sub-adder) size of 4, and switches
// it between exact and approximate mode with an OM bit. Its gate-level insides
// are not given there; the windowed-carry rule above is this design's reading
// of "approximate carry chain of size 4".
//
// Purely combinational.
module px_approx_adder #(
  parameter int unsigned W   = 16,
  parameter int unsigned WIN = 4
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic         cin,
  input  logic         approx,
  output logic [W-1:0] sum,
  output logic         cout
);

  logic [W-1:0] g, p;
  logic [W:0]   c_exact, c_apx;

  assign g = a & b;
  assign p = a ^ b;

  // Exact carry chain.
  always_comb begin
    logic c;
    c = cin;
    c_exact[0] = c;
    for (int i = 0; i < W; i++) begin
      c = g[i] | (p[i] & c);
      c_exact[i+1] = c;
    end
  end

  // Windowed carries: carry into bit i from bits max(0, i-WIN) .. i-1 only.
  always_comb begin
    logic c;
    for (int i = 0; i <= W; i++) begin
      c = (i <= int'(WIN)) ? cin : 1'b0;
      for (int j = 0; j < W; j++)
        if (j < i && j >= i - int'(WIN))
          c = g[j] | (p[j] & c);
      c_apx[i] = c;
    end
  end

  always_comb begin
    if (approx) begin
      sum  = p ^ c_apx[W-1:0];
      cout = c_apx[W];
    end else begin
      sum  = p ^ c_exact[W-1:0];
      cout = c_exact[W];
    end
  end

endmodule
