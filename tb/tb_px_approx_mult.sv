// tb_px_approx_mult: self-checking test of the accuracy-configurable
// multiplier. Exact mode against a * b; approximate mode against the column
// compressor reference model; checks that the approximate product never
// exceeds the exact one and that the mean relative error stays small.
module tb_px_approx_mult;
  import tb_px_models::*;

  logic [15:0] a, b;
  logic [31:0] p;
  logic        apx;
  int checks = 0, failures = 0, n_err = 0;
  real rel_sum = 0.0;

  px_approx_mult #(.W(16)) dut (.a(a), .b(b), .approx(apx), .p(p));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] ex, am;
    for (int k = 0; k < 3000; k++) begin
      a = 16'($urandom); b = 16'($urandom);
      if (k < 8) begin a = (k & 1) ? 16'hFFFF : 16'h0; b = (k & 2) ? 16'hFFFF : 16'h1234; end
      ex = 32'(a) * 32'(b);
      apx = 0; #1;
      checks++;
      if (p !== ex) begin failures++; $display("FAIL exact %h*%h got %h exp %h", a, b, p, ex); end
      apx = 1; #1;
      am = m_mul(a, b, 1'b1);
      checks++;
      if (p !== am) begin failures++; $display("FAIL approx %h*%h got %h exp %h", a, b, p, am); end
      checks++;
      if (p > ex) begin failures++; $display("FAIL approx above exact"); end
      if (p != ex) n_err++;
      if (ex != 0) rel_sum += (real'(ex) - real'(p)) / real'(ex);
    end
    checks++;
    if (n_err == 0 || rel_sum / 3000.0 > 0.01) begin
      failures++;
      $display("FAIL approximate error statistics: errors=%0d mean rel=%f", n_err, rel_sum / 3000.0);
    end
    $display("approximate products in error: %0d/3000, mean relative error %f", n_err, rel_sum / 3000.0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
