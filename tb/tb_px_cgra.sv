// tb_px_cgra: end-to-end test of the PX-CGRA at its default size (five tiles,
// PAC1 .. PAC5).
//
// The host side is modelled here. It fills the tile-selection table of
// application 0 so that tile t costs 5*t % quality loss and reaches
// 50 + 10*t % utilization, and stores one tile-wide context word:
//   PAC(0,0): ALU0 = N * W             -> east (into PAC(0,1))
//   PAC(0,1): ALU0 = N * E, ALU1 = ALU0 + W -> edge 2  (dot product)
//   PAC(1,0): ALU0 = MAC(W * S)        -> edge 4      (running sum)
//   PAC(1,1): ALU0 = E - S -> edge 3,  ALU3 = E > S -> edge 5
// (six of the sixteen ALUs operate).
// For quality constraints 0, 5, .. 20 % it requests a tile (which must be
// tile q/5), waits for power-up, loads the context, streams 60 random operand
// sets and compares every output with the reference model at the accuracy of
// that tile (ALU i of tile t is approximate when i < t). It then asks for an
// application with no table entry (every tile must be gated) and checks the
// all-off input. Each mechanism is counted and must occur at least once:
// selection, tile switch, wake-up wait, context load, MAC accumulation,
// approximate results that differ from exact ones, failed selection, and
// gating.
module tb_px_cgra;
  import px_pkg::*;
  import tb_px_models::*;

  localparam int NT = 5;
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
  int checks = 0, failures = 0;
  int m_select = 0, m_switch = 0, m_wake = 0, m_load = 0, m_mac = 0, m_apx = 0,
      m_none = 0, m_gate = 0;

  always #5 clk = ~clk;

  px_cgra dut (.*);

  task automatic chk(logic ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
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

  initial begin
    int prev_tile;
    data_t h [$][N_EDGE];
    data_t cur [N_EDGE];
    data_t acc, ex_acc;
    int ndiff;
    data_in = '0;
    ctx_wr_data = '0;
    ctx_wr_data[0].alu[0] = '{om: 2'd0, wr: 3'd3, mux_a: 3'd4, mux_b: 3'd7, opcode: 5'(OP_MUL)};
    ctx_wr_data[1].alu[0] = '{om: 2'd0, wr: 3'd1, mux_a: 3'd4, mux_b: 3'd5, opcode: 5'(OP_MUL)};
    ctx_wr_data[1].alu[1] = '{om: 2'd0, wr: 3'd3, mux_a: 3'd0, mux_b: 3'd7, opcode: 5'(OP_ADD)};
    ctx_wr_data[2].alu[0] = '{om: 2'd0, wr: 3'd4, mux_a: 3'd7, mux_b: 3'd6, opcode: 5'(OP_MAC)};
    ctx_wr_data[3].alu[0] = '{om: 2'd0, wr: 3'd3, mux_a: 3'd5, mux_b: 3'd6, opcode: 5'(OP_SUB)};
    ctx_wr_data[3].alu[3] = '{om: 2'd0, wr: 3'd4, mux_a: 3'd5, mux_b: 3'd6, opcode: 5'(OP_GT)};
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    chk(pwr_en == 0, "every tile gated after reset");
    // host: table and context memory
    for (int t = 0; t < NT; t++) begin
      lut_we = 1; lut_app = 3'd0; lut_tile = 3'(t); lut_valid = 1;
      lut_qloss = 7'(5 * t); lut_util = 7'(50 + 10 * t);
      @(negedge clk);
    end
    lut_we = 0;
    ctx_wr_en = 1; ctx_wr_addr = 4'd3;
    @(negedge clk);
    ctx_wr_en = 0;
    prev_tile = -1;
    for (int q = 0; q <= 20; q += 5) begin
      int t, waited;
      t = q / 5;
      // select a tile for the quality constraint
      sel_req = 1; app_id = 3'd0; q_const = 7'(q);
      @(negedge clk);
      sel_req = 0;
      chk(sel_done && sel_found && int'(sel_tile) == t, $sformatf("tile %0d selected for %0d %%", t, q));
      m_select++;
      if (prev_tile >= 0 && prev_tile != t) m_switch++;
      prev_tile = t;
      @(negedge clk);                  // power control acts on sel_done
      waited = 0;
      while (!pwr_ready && waited < 20) begin @(negedge clk); waited++; end
      if (waited > 1) m_wake++;
      chk(pwr_ready && pwr_en == NT'(1 << t), "only the selected tile powered");
      chk(n_active == 0, "context cleared by power-up");
      // load the context
      ctx_ld_en = 1; ctx_ld_addr = 4'd3;
      @(negedge clk);
      ctx_ld_en = 0;
      @(negedge clk);
      chk(n_active == 6, "six ALUs operate after the load");
      m_load++;
      // stream operands
      h.delete();
      acc = '0; ex_acc = '0; ndiff = 0;
      for (int k = 0; k < 60; k++) begin
        for (int e = 0; e < N_EDGE; e++) begin
          cur[e] = data_t'($urandom % 256);
          data_in[e] = cur[e];
        end
        h.push_back(cur);
        @(posedge clk); #1;
        acc    = m_add(mul16(cur[7], cur[4], t >= 1), acc, 1'b0, t >= 1);
        ex_acc = ex_acc + cur[7] * cur[4];
        chk(data_out[4] == acc, $sformatf("MAC on tile %0d", t));
        if (k > 0) m_mac++;
        chk(data_out[3] == m_add(cur[3], ~cur[5], 1'b1, t >= 1), "E - S on edge 3");
        chk(data_out[5] == (($signed(cur[3]) > $signed(cur[5])) ? 1 : 0), "E > S on edge 5 (exact ALU)");
        if (h.size() >= 2) begin
          data_t p[N_EDGE];
          data_t d_exp;
          p = h[h.size() - 2];
          d_exp = m_add(mul16(p[1], p[2], t >= 1), mul16(p[0], p[6], t >= 1), 1'b0, t >= 2);
          chk(data_out[2] == d_exp, $sformatf("dot product on tile %0d", t));
          if (data_out[2] != mul16(p[1], p[2], 1'b0) + mul16(p[0], p[6], 1'b0)) ndiff++;
        end
        @(negedge clk);
      end
      if (t == 0) chk(ndiff == 0 && acc == ex_acc, "exact tile gives exact results");
      else if (ndiff > 0 || acc != ex_acc) m_apx++;
      data_in = '0;
      @(negedge clk);
    end
    // application without entries: nothing selected, all gated
    sel_req = 1; app_id = 3'd5; q_const = 7'd100;
    @(negedge clk);
    sel_req = 0;
    chk(sel_done && !sel_found, "no tile for an unknown application");
    if (sel_done && !sel_found) m_none++;
    @(negedge clk);
    chk(pwr_en == 0 && !pwr_ready, "all tiles gated");
    // power up tile 1 again, then all_off
    sel_req = 1; app_id = 3'd0; q_const = 7'd5;
    @(negedge clk);
    sel_req = 0;
    @(negedge clk);
    chk(pwr_en == NT'(2), "tile 1 powered again");
    all_off = 1;
    @(negedge clk);
    all_off = 0;
    chk(pwr_en == 0 && data_out == '0, "all_off gates every tile");
    if (pwr_en == 0) m_gate++;
    $display("mechanisms: select=%0d switch=%0d wake=%0d load=%0d mac=%0d approx=%0d none=%0d gate=%0d",
             m_select, m_switch, m_wake, m_load, m_mac, m_apx, m_none, m_gate);
    chk(m_select > 0, "selection happened");
    chk(m_switch > 0, "tile switch happened");
    chk(m_wake > 0, "wake-up wait happened");
    chk(m_load > 0, "context load happened");
    chk(m_mac > 0, "MAC accumulation happened");
    chk(m_apx > 0, "approximate results happened");
    chk(m_none > 0, "failed selection happened");
    chk(m_gate > 0, "all-off gating happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
