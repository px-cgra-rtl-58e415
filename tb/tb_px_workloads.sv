// tb_px_workloads: the two evaluation workloads on the PX-CGRA top level.
//
// 32-tap FIR filter: y[n] = sum over k of c[k] * x[n-k]. PAC(1,0) of the
// selected tile runs it on one ALU in MAC mode: a clearing context
// (ALU0 = XOR q, q) is loaded, then the MAC context (ALU0 = q + W * S, result
// on edge 4), and the 32 (x, c) pairs are streamed into edges 7 and 4, one per
// cycle. 32nd-order polynomial: y = a32 x^32 + .. + a0 by Horner's rule on
// ALU0 (q1 * x, x on edge 7) and ALU1 (q0 + a, coefficient on edge 4), one
// step every two cycles, the coefficient presented in the second cycle.
// Both are run on the exact tile and on the tiles of the three cluster types
// used for evaluation (PAC2, PAC3, PAC4), selected through the selection
// table by their quality constraint. Every result is compared with the
// reference model at the accuracy of the ALUs used (ALU i of tile t is
// approximate when i < t) and the deviation from the exact result is
// reported. Data are kept small (x, c < 32) so the FIR sum does not wrap.
module tb_px_workloads;
  import px_pkg::*;
  import tb_px_models::*;

  localparam int NT = 5, TAPS = 32, ORDER = 32;
  logic clk = 0, rst_n = 0;
  logic ctx_wr_en = 0, ctx_ld_en = 0, lut_we = 0, lut_valid = 0, sel_req = 0, all_off = 0;
  logic [3:0] ctx_wr_addr = '0, ctx_ld_addr = '0;
  pac_ctx_t [N_PAC-1:0] ctx_wr_data;
  logic [2:0] lut_app = '0, lut_tile = '0, app_id = '0, sel_tile;
  logic [6:0] lut_qloss = '0, lut_util = '0, q_const = '0;
  logic sel_done, sel_found, pwr_ready;
  logic [NT-1:0] pwr_en;
  data_t [N_EDGE-1:0] data_in, data_out;
  logic [4:0] n_active;
  int checks = 0, failures = 0, n_fir = 0, n_poe = 0, n_dev = 0;

  always #5 clk = ~clk;

  px_cgra dut (.*);

  task automatic chk(logic ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic data_t mul16(data_t a, data_t b, logic apx);
    logic [31:0] p;
    p = m_mul(a, b, apx);
    return p[15:0];
  endfunction

  task automatic write_ctx(int addr, pac_ctx_t [N_PAC-1:0] w);
    ctx_wr_en = 1; ctx_wr_addr = 4'(addr); ctx_wr_data = w;
    @(negedge clk);
    ctx_wr_en = 0;
  endtask

  // load a context word; it operates from the third edge on
  task automatic load(int addr);
    ctx_ld_en = 1; ctx_ld_addr = 4'(addr);
    @(negedge clk);
    ctx_ld_en = 0;
    @(negedge clk);
  endtask

  task automatic select(int q, int t);
    sel_req = 1; app_id = 3'd0; q_const = 7'(q);
    @(negedge clk);
    sel_req = 0;
    chk(sel_found && int'(sel_tile) == t, $sformatf("tile %0d for %0d %%", t, q));
    @(negedge clk);
    while (!pwr_ready) @(negedge clk);
  endtask

  task automatic run_fir(int t);
    data_t x [TAPS], c [TAPS];
    data_t y_ref, y_ex;
    logic apx;
    apx = (t >= 1);
    for (int k = 0; k < TAPS; k++) begin
      x[k] = data_t'($urandom % 32);
      c[k] = data_t'($urandom % 32);
    end
    data_in = '0;
    load(0);                 // clear
    @(negedge clk);
    load(1);                 // MAC
    y_ref = '0; y_ex = '0;
    for (int k = 0; k < TAPS; k++) begin
      data_in[7] = x[k]; data_in[4] = c[k];
      y_ref = m_add(mul16(x[k], c[k], apx), y_ref, 1'b0, apx);
      y_ex  = y_ex + x[k] * c[k];
      @(negedge clk);
    end
    data_in = '0;
    chk(data_out[4] == y_ref, $sformatf("FIR output on tile %0d", t));
    if (data_out[4] != y_ex) n_dev++;
    $display("FIR tile %0d: got %0d exact %0d (deviation %0.2f %%)", t, data_out[4], y_ex,
             100.0 * (real'(y_ex) - real'(data_out[4])) / real'(y_ex));
    n_fir++;
  endtask

  task automatic run_poe(int t);
    data_t a [ORDER + 1];
    data_t xv, y_ref, y_ex;
    logic mapx, aapx;
    mapx = (t >= 1); aapx = (t >= 2);
    xv = data_t'(1 + $urandom % 3);
    for (int k = 0; k <= ORDER; k++) a[k] = data_t'($urandom % 64);
    data_in = '0;
    load(2);                 // clear q0, q1
    @(negedge clk);
    load(3);                 // Horner
    y_ref = '0; y_ex = '0;
    data_in[7] = xv;
    for (int k = ORDER; k >= 0; k--) begin
      data_in[4] = '0;
      @(negedge clk);        // q0 <= q1 * x
      data_in[4] = a[k];
      @(negedge clk);        // q1 <= q0 + a[k]
      y_ref = m_add(mul16(y_ref, xv, mapx), a[k], 1'b0, aapx);
      y_ex  = y_ex * xv + a[k];
    end
    data_in = '0;
    chk(data_out[4] == y_ref, $sformatf("PoE output on tile %0d", t));
    if (data_out[4] != y_ex) n_dev++;
    $display("PoE tile %0d (x=%0d, mod 2^16): got %h exact %h", t, xv, data_out[4], y_ex);
    n_poe++;
  endtask

  initial begin
    pac_ctx_t [N_PAC-1:0] w;
    data_in = '0;
    ctx_wr_data = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    for (int t = 0; t < NT; t++) begin
      lut_we = 1; lut_app = 3'd0; lut_tile = 3'(t); lut_valid = 1;
      lut_qloss = 7'(5 * t); lut_util = 7'(50 + 10 * t);
      @(negedge clk);
    end
    lut_we = 0;
    // 0: clear ALU0 and ALU1 of PAC(1,0)
    w = '0;
    w[2].alu[0] = '{om: 2'd0, wr: 3'd1, mux_a: 3'd0, mux_b: 3'd0, opcode: 5'(OP_XOR)};
    w[2].alu[1] = '{om: 2'd0, wr: 3'd1, mux_a: 3'd1, mux_b: 3'd1, opcode: 5'(OP_XOR)};
    write_ctx(0, w);
    write_ctx(2, w);
    // 1: MAC
    w = '0;
    w[2].alu[0] = '{om: 2'd0, wr: 3'd4, mux_a: 3'd7, mux_b: 3'd6, opcode: 5'(OP_MAC)};
    write_ctx(1, w);
    // 3: Horner step
    w = '0;
    w[2].alu[0] = '{om: 2'd0, wr: 3'd1, mux_a: 3'd1, mux_b: 3'd7, opcode: 5'(OP_MUL)};
    w[2].alu[1] = '{om: 2'd0, wr: 3'd4, mux_a: 3'd0, mux_b: 3'd6, opcode: 5'(OP_ADD)};
    write_ctx(3, w);
    for (int t = 0; t <= 3; t++) begin
      select(5 * t, t);
      repeat (4) run_fir(t);
      repeat (3) run_poe(t);
    end
    chk(n_fir == 16 && n_poe == 12, "all workload runs done");
    chk(n_dev > 0, "approximate tiles deviate from the exact result");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
