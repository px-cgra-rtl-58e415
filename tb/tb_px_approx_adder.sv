// tb_px_approx_adder: self-checking test of the accuracy-configurable adder.
// Random and corner operands in both modes; exact mode against a + b + cin,
// approximate mode against the windowed-carry reference model. Also checks
// that approximate mode really loses long carries (0x00FF + 0x0001).
module tb_px_approx_adder;
  import tb_px_models::*;

  logic [15:0] a, b, s;
  logic        cin, apx, co;
  int checks = 0, failures = 0, n_err = 0;

  px_approx_adder #(.W(16), .WIN(4)) dut (
    .a(a), .b(b), .cin(cin), .approx(apx), .sum(s), .cout(co)
  );

  task automatic check(logic [15:0] exp, string what);
    checks++;
    if (s !== exp) begin
      failures++;
      $display("FAIL %s: a=%h b=%h cin=%0b apx=%0b got %h exp %h", what, a, b, cin, apx, s, exp);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [16:0] full;
    for (int k = 0; k < 4000; k++) begin
      a = 16'($urandom); b = 16'($urandom); cin = 1'($urandom);
      apx = 0; #1;
      full = {1'b0, a} + {1'b0, b} + 17'(cin);
      check(full[15:0], "exact");
      checks++;
      if (co !== full[16]) begin failures++; $display("FAIL cout"); end
      apx = 1; #1;
      check(m_add(a, b, cin, 1'b1), "approx");
      if (s != full[15:0]) n_err++;
    end
    // a carry that must travel 8 bits is cut in approximate mode
    a = 16'h00FF; b = 16'h0001; cin = 0;
    apx = 0; #1; check(16'h0100, "long carry exact");
    apx = 1; #1; check(16'h00E0, "long carry approx");
    // a carry that travels within the window is kept
    a = 16'h0007; b = 16'h0001; apx = 1; #1; check(16'h0008, "short carry approx");
    checks++;
    if (n_err == 0) begin failures++; $display("FAIL approximate mode never differs"); end
    $display("approximate mode error rate %0d/4000", n_err);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
