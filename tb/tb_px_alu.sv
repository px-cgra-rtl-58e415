// tb_px_alu: self-checking test of the three ALU types.
// One exact, one fixed-level approximate and one accuracy-configurable ALU
// receive the same random operands and opcodes; each registered result is
// compared with the reference model at the accuracy the ALU type (and, for
// the configurable ALU, the OM field) calls for. Also checks MAC accumulation
// over several cycles, that an idle ALU (WR = 0 or NOP) holds its register,
// that en = 0 clears it, and the one-cycle result latency.
module tb_px_alu;
  import px_pkg::*;
  import tb_px_models::*;

  logic clk = 0, rst_n = 0, en = 1;
  alu_ctx_t ctx_e, ctx_a, ctx_c;
  data_t a, b;
  data_t res_e, res_a, res_c, q_e, q_a, q_c;
  logic act_e, act_a, act_c;
  int checks = 0, failures = 0;
  int lvl_seen[4];

  always #5 clk = ~clk;

  px_alu #(.KIND(ALU_EXACT))  u_e (.clk, .rst_n, .en, .ctx(ctx_e), .a, .b, .result(res_e), .q(q_e), .active(act_e));
  px_alu #(.KIND(ALU_APPROX)) u_a (.clk, .rst_n, .en, .ctx(ctx_a), .a, .b, .result(res_a), .q(q_a), .active(act_a));
  px_alu #(.KIND(ALU_CONFIG)) u_c (.clk, .rst_n, .en, .ctx(ctx_c), .a, .b, .result(res_c), .q(q_c), .active(act_c));

  function automatic alu_ctx_t mk(int op, logic [2:0] wr, logic [1:0] om);
    alu_ctx_t c;
    c = '0;
    c.opcode = 5'(op);
    c.wr = wr;
    c.om = om;
    return c;
  endfunction

  task automatic chk(data_t got, data_t exp, string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: a=%h b=%h got %h exp %h", what, a, b, got, exp);
    end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    data_t pe, pa, pc, exp_e, exp_a, exp_c;
    logic [1:0] om;
    int op;
    ctx_e = '0; ctx_a = '0; ctx_c = '0; a = '0; b = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    for (int k = 0; k < 3000; k++) begin
      op = 1 + ($urandom % 15);
      if (op == 4) op = 3;              // MAC checked separately
      om = 2'($urandom);
      a = data_t'($urandom); b = data_t'($urandom);
      if ((k % 3) == 0) begin a = data_t'($urandom % 256); b = data_t'($urandom % 256); end
      ctx_e = mk(op, 3'd1, om); ctx_a = mk(op, 3'd1, om); ctx_c = mk(op, 3'd1, om);
      exp_e = m_alu(op, a, b, q_e, 1'b0, 1'b0);
      exp_a = m_alu(op, a, b, q_a, 1'b1, 1'b1);
      exp_c = m_alu(op, a, b, q_c, om[0], om[1]);
      #1;
      checks++;
      if (!(act_e && act_a && act_c)) begin failures++; $display("FAIL active"); end
      @(posedge clk); #1;
      chk(q_e, exp_e, $sformatf("exact op %0d", op));
      chk(q_a, exp_a, $sformatf("approx op %0d", op));
      chk(q_c, exp_c, $sformatf("config op %0d om %0d", op, om));
      if (op == 1 || op == 3) lvl_seen[om]++;
      @(negedge clk);
    end
    // MAC: accumulate 6 products of small operands, all three types
    ctx_e = mk(1, 3'd1, 2'd0); a = '0; b = '0;          // clear: 0 + 0
    ctx_a = ctx_e; ctx_c = ctx_e;
    @(posedge clk); @(negedge clk);
    begin
      data_t acc_e, acc_a, acc_c;
      acc_e = '0; acc_a = '0; acc_c = '0;
      ctx_e = mk(4, 3'd1, 2'd0); ctx_a = ctx_e; ctx_c = mk(4, 3'd1, 2'd3);
      for (int k = 0; k < 6; k++) begin
        a = data_t'($urandom % 200); b = data_t'($urandom % 200);
        acc_e = m_alu(4, a, b, acc_e, 1'b0, 1'b0);
        acc_a = m_alu(4, a, b, acc_a, 1'b1, 1'b1);
        acc_c = m_alu(4, a, b, acc_c, 1'b1, 1'b1);
        @(posedge clk); #1;
        chk(q_e, acc_e, "MAC exact");
        chk(q_a, acc_a, "MAC approx");
        chk(q_c, acc_c, "MAC config level 4");
        @(negedge clk);
      end
      // idle: WR = 0 holds the register
      pe = q_e; pa = q_a; pc = q_c;
      ctx_e = mk(1, 3'd0, 2'd0); ctx_a = mk(0, 3'd1, 2'd0); ctx_c = ctx_e;
      a = 16'h1111; b = 16'h2222;
      #1;
      checks++;
      if (act_e || act_a || act_c) begin failures++; $display("FAIL idle still active"); end
      @(posedge clk); #1;
      chk(q_e, pe, "idle WR=0 holds");
      chk(q_a, pa, "idle NOP holds");
      chk(q_c, pc, "idle config holds");
      // power gating clears
      @(negedge clk); en = 0;
      @(posedge clk); #1;
      chk(q_e, '0, "en=0 clears exact");
      chk(q_c, '0, "en=0 clears config");
      @(negedge clk); en = 1;
    end
    for (int l = 0; l < 4; l++) begin
      checks++;
      if (lvl_seen[l] == 0) begin failures++; $display("FAIL accuracy level %0d never used", l + 1); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
