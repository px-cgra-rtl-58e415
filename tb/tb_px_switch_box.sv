// tb_px_switch_box: self-checking test of the PAC switch box.
// Random contexts and data; each ALU operand must be the source numbered by
// its MUX_A / MUX_B field (0..3 ALU registers, 4..7 inputs N, E, S, W), and
// each output port must carry the result of the lowest-numbered active ALU
// whose WR code names it, else the source its switch field selects.
module tb_px_switch_box;
  import px_pkg::*;

  pac_ctx_t ctx;
  data_t [N_ALU-1:0] alu_q, alu_res, op_a, op_b;
  logic  [N_ALU-1:0] alu_act;
  data_t [N_DIR-1:0] pac_in, port_next;
  int checks = 0, failures = 0, n_claim = 0, n_route = 0;

  px_switch_box dut (.ctx, .alu_q, .alu_result(alu_res), .alu_act, .pac_in,
                     .op_a, .op_b, .port_next);

  function automatic data_t src(int s);
    return (s < 4) ? alu_q[s] : pac_in[s - 4];
  endfunction

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    data_t exp;
    int owner;
    for (int k = 0; k < 2000; k++) begin
      ctx = '0;
      for (int i = 0; i < N_ALU; i++) begin
        ctx.alu[i].mux_a = 3'($urandom);
        ctx.alu[i].mux_b = 3'($urandom);
        ctx.alu[i].wr    = 3'($urandom);
        ctx.alu[i].opcode = 5'($urandom % 16);
        alu_q[i]   = data_t'($urandom);
        alu_res[i] = data_t'($urandom);
        alu_act[i] = (ctx.alu[i].wr != 0) && (ctx.alu[i].opcode != 0);
      end
      for (int d = 0; d < N_DIR; d++) begin
        ctx.sw[d] = 3'($urandom);
        pac_in[d] = data_t'($urandom);
      end
      #1;
      for (int i = 0; i < N_ALU; i++) begin
        checks += 2;
        if (op_a[i] !== src(int'(ctx.alu[i].mux_a))) begin failures++; $display("FAIL op_a[%0d]", i); end
        if (op_b[i] !== src(int'(ctx.alu[i].mux_b))) begin failures++; $display("FAIL op_b[%0d]", i); end
      end
      for (int d = 0; d < N_DIR; d++) begin
        owner = -1;
        for (int i = 0; i < N_ALU; i++)
          if (owner < 0 && alu_act[i] && int'(ctx.alu[i].wr) == 2 + d) owner = i;
        if (owner >= 0) begin exp = alu_res[owner]; n_claim++; end
        else begin exp = src(int'(ctx.sw[d])); n_route++; end
        checks++;
        if (port_next[d] !== exp) begin
          failures++;
          $display("FAIL port %0d owner %0d got %h exp %h", d, owner, port_next[d], exp);
        end
      end
    end
    checks++;
    if (n_claim == 0 || n_route == 0) begin failures++; $display("FAIL a port path never used"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
