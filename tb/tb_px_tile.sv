// tb_px_tile: self-checking test of a 2 x 2 tile.
// Context: PAC(0,0) multiplies its north and west edge inputs and sends the
// product east; PAC(0,1) multiplies its north and east edge inputs and adds
// the product arriving from the west, sending the sum out of its east edge
// (edge 2): a dot product of two pairs across two PACs, result after two
// cycles. A second path forwards the west edge of row 1 (edge 7) through
// PAC(1,0) east, PAC(1,1) north and PAC(0,1) north to edge 1 (three cycles)
// and PAC(1,1) also sends it out of its south edge (edge 5, two cycles).
// Checks the results cycle by cycle for an exact tile (PAC1) and an
// approximate tile (PAC5, N_APX = 4), the utilization count, and power gating.
module tb_px_tile;
  import px_pkg::*;
  import tb_px_models::*;

  logic clk = 0, rst_n = 0, en = 1, ctx_we = 0;
  pac_ctx_t [N_PAC-1:0] ctx_in;
  data_t [N_EDGE-1:0] edge_in, out_e, out_a;
  logic [4:0] act_e, act_a;
  int checks = 0, failures = 0, n_diff = 0;

  always #5 clk = ~clk;

  px_tile #(.N_APX(0)) u_e (.clk, .rst_n, .en, .ctx_we, .ctx_in, .edge_in, .edge_out(out_e), .n_active(act_e));
  px_tile #(.N_APX(4)) u_a (.clk, .rst_n, .en, .ctx_we, .ctx_in, .edge_in, .edge_out(out_a), .n_active(act_a));

  task automatic chk(logic ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  function automatic data_t dot(data_t a, data_t b, data_t c, data_t d, logic apx);
    logic [31:0] p0, p1;
    p0 = m_mul(a, b, apx);
    p1 = m_mul(c, d, apx);
    return m_add(p1[15:0], p0[15:0], 1'b0, apx);
  endfunction

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    data_t h [$][N_EDGE];
    data_t cur [N_EDGE];
    ctx_in = '0;
    // PAC0 = (0,0): ALU0 = in N * in W -> port E
    ctx_in[0].alu[0] = '{om: 2'd0, wr: 3'd3, mux_a: 3'd4, mux_b: 3'd7, opcode: 5'(OP_MUL)};
    // PAC1 = (0,1): ALU0 = in N * in E (local), ALU1 = ALU0 + in W -> port E
    ctx_in[1].alu[0] = '{om: 2'd0, wr: 3'd1, mux_a: 3'd4, mux_b: 3'd5, opcode: 5'(OP_MUL)};
    ctx_in[1].alu[1] = '{om: 2'd0, wr: 3'd3, mux_a: 3'd0, mux_b: 3'd7, opcode: 5'(OP_ADD)};
    ctx_in[1].sw[DIR_N] = 3'd6;       // forward in S to port N
    // PAC2 = (1,0): forward in W to port E
    ctx_in[2].sw[DIR_E] = 3'd7;
    // PAC3 = (1,1): forward in W to ports N and S
    ctx_in[3].sw[DIR_N] = 3'd7;
    ctx_in[3].sw[DIR_S] = 3'd7;
    edge_in = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    ctx_we = 1;
    @(negedge clk);
    ctx_we = 0;
    chk(act_e == 3 && act_a == 3, "three of sixteen ALUs operate");
    for (int t = 0; t < 200; t++) begin
      for (int k = 0; k < N_EDGE; k++) begin
        cur[k] = data_t'($urandom % 256);
        edge_in[k] = cur[k];
      end
      h.push_back(cur);
      @(posedge clk); #1;
      if (h.size() >= 2) begin
        data_t p[N_EDGE];
        p = h[h.size() - 2];
        // edges: 0 N(0,0) 1 N(0,1) 2 E(0,1) 3 E(1,1) 4 S(1,0) 5 S(1,1) 6 W(0,0) 7 W(1,0)
        chk(out_e[2] == dot(p[0], p[6], p[1], p[2], 1'b0), "exact dot product on edge 2");
        chk(out_a[2] == dot(p[0], p[6], p[1], p[2], 1'b1), "approximate dot product on edge 2");
        chk(out_e[5] == p[7] && out_a[5] == p[7], "edge 7 to edge 5 in two hops");
        if (out_e[2] != out_a[2]) n_diff++;
      end
      if (h.size() >= 3) begin
        data_t p[N_EDGE];
        p = h[h.size() - 3];
        chk(out_e[1] == p[7] && out_a[1] == p[7], "edge 7 to edge 1 in three hops");
      end
      @(negedge clk);
    end
    chk(n_diff > 0, "approximate tile differs from exact tile");
    en = 0;
    @(posedge clk); #1;
    chk(out_e == '0 && act_e == 0, "power gating clears the tile");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
