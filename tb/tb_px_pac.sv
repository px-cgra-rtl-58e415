// tb_px_pac: self-checking test of a PAC.
// Three PACs of different composition (all exact = PAC1, all approximate =
// PAC5, and a mixed cluster of one approximate, two configurable and one
// exact ALU) run the same context: ALU0 = N*E, ALU1 = S*W, ALU2 = ALU0+ALU1
// sent to the east port, ALU3 idle, while the switch field forwards input W to
// port N, ALU0's register to port S and input E to port W. Random operands
// stream in every cycle. Checks, per cycle: east port = (N*E + S*W) of the
// inputs two cycles earlier at the accuracy of each ALU, the forwarded ports
// with their one-cycle latency, the count of operating ALUs, that a context
// only takes effect after ctx_we, and that en = 0 clears the cluster.
module tb_px_pac;
  import px_pkg::*;
  import tb_px_models::*;

  localparam int ND = 3;
  logic clk = 0, rst_n = 0, en = 1, ctx_we = 0;
  pac_ctx_t ctx_in;
  data_t [N_DIR-1:0] in_port;
  data_t [N_DIR-1:0] out_port [ND];
  logic  [2:0] n_act [ND];
  int checks = 0, failures = 0, n_diff = 0;

  always #5 clk = ~clk;

  px_pac #(.N_APX(0), .N_CFG(0)) u_p1 (.clk, .rst_n, .en, .ctx_we, .ctx_in, .in_port, .out_port(out_port[0]), .n_active(n_act[0]));
  px_pac #(.N_APX(4), .N_CFG(0)) u_p5 (.clk, .rst_n, .en, .ctx_we, .ctx_in, .in_port, .out_port(out_port[1]), .n_active(n_act[1]));
  px_pac #(.N_APX(1), .N_CFG(2)) u_mx (.clk, .rst_n, .en, .ctx_we, .ctx_in, .in_port, .out_port(out_port[2]), .n_active(n_act[2]));

  // accuracy of ALU i in DUT d; the configurable ALUs get
  // OM = 2 (ALU1, approximate multiply) and OM = 1 (ALU2, approximate add)
  function automatic logic [1:0] acc_of(int d, int i);
    if (d == 0) return 2'b00;
    if (d == 1) return 2'b11;
    case (i)
      0: return 2'b11;
      1: return 2'b01;   // bit 0 = multiply approximate (OM 2)
      2: return 2'b10;   // bit 1 = add approximate (OM 1)
      default: return 2'b00;
    endcase
  endfunction

  function automatic data_t expr(int d, data_t n, data_t e, data_t s, data_t w);
    logic [1:0] c0, c1, c2;
    logic [31:0] p0, p1;
    c0 = acc_of(d, 0); c1 = acc_of(d, 1); c2 = acc_of(d, 2);
    p0 = m_mul(n, e, c0[0]);
    p1 = m_mul(s, w, c1[0]);
    return m_add(p0[15:0], p1[15:0], 1'b0, c2[1]);
  endfunction

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(logic ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  initial begin
    data_t hist [$][N_DIR];
    data_t cur [N_DIR];
    ctx_in = '0;
    ctx_in.alu[0] = '{om: 2'd0, wr: 3'd1, mux_a: 3'd4, mux_b: 3'd5, opcode: 5'(OP_MUL)};
    ctx_in.alu[1] = '{om: 2'd2, wr: 3'd1, mux_a: 3'd6, mux_b: 3'd7, opcode: 5'(OP_MUL)};
    ctx_in.alu[2] = '{om: 2'd1, wr: 3'd3, mux_a: 3'd0, mux_b: 3'd1, opcode: 5'(OP_ADD)};
    ctx_in.alu[3] = '{om: 2'd0, wr: 3'd0, mux_a: 3'd0, mux_b: 3'd0, opcode: 5'(OP_ADD)};
    ctx_in.sw[DIR_N] = 3'd7;
    ctx_in.sw[DIR_S] = 3'd0;
    ctx_in.sw[DIR_W] = 3'd5;
    ctx_in.sw[DIR_E] = 3'd6;
    in_port = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    // context not yet loaded: nothing operates
    for (int d = 0; d < ND; d++) chk(n_act[d] == 0, "idle before load");
    ctx_we = 1;
    @(negedge clk);
    ctx_we = 0;
    for (int d = 0; d < ND; d++) chk(n_act[d] == 3, "three ALUs operate");
    for (int t = 0; t < 200; t++) begin
      for (int k = 0; k < N_DIR; k++) begin
        cur[k] = data_t'($urandom % 256);
        in_port[k] = cur[k];
      end
      hist.push_back(cur);
      @(posedge clk); #1;
      for (int d = 0; d < ND; d++) begin
        chk(out_port[d][DIR_N] == cur[DIR_W], "port N forwards W");
        chk(out_port[d][DIR_W] == cur[DIR_E], "port W forwards E");
        if (hist.size() >= 2) begin
          data_t h[N_DIR];
          h = hist[hist.size() - 2];
          chk(out_port[d][DIR_S] == m_mul(h[DIR_N], h[DIR_E], acc_of(d, 0) != 0) % 65536,
              $sformatf("port S = ALU0 register, dut %0d", d));
          chk(out_port[d][DIR_E] == expr(d, h[DIR_N], h[DIR_E], h[DIR_S], h[DIR_W]),
              $sformatf("port E = N*E + S*W, dut %0d", d));
        end
      end
      if (out_port[0][DIR_E] != out_port[1][DIR_E]) n_diff++;
      @(negedge clk);
    end
    // approximate and exact clusters must disagree on some outputs
    chk(n_diff > 0, "PAC5 differs from PAC1 at least once");
    $display("PAC5 result differs from PAC1 in %0d of 200 cycles", n_diff);
    en = 0;
    @(posedge clk); #1;
    for (int d = 0; d < ND; d++) begin
      chk(out_port[d] == '0, "en=0 clears ports");
      chk(n_act[d] == 0, "en=0 clears context");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
