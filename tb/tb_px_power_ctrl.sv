// tb_px_power_ctrl: self-checking test of the power-gating control.
// Selections power exactly the selected tile; ready must rise exactly WAKE
// cycles after a selection that switches tiles and one cycle after one that
// keeps the powered tile; a failed selection and all_off gate every tile.
module tb_px_power_ctrl;
  localparam int NT = 5, WAKE = 4;
  logic clk = 0, rst_n = 0, sel_done = 0, sel_found = 0, all_off = 0;
  logic [2:0] sel_tile;
  logic [NT-1:0] pwr_en;
  logic ready;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  px_power_ctrl #(.N_TILES(NT), .WAKE(WAKE)) dut (.clk, .rst_n, .sel_done, .sel_found,
    .sel_tile, .all_off, .pwr_en, .ready);

  task automatic chk(logic ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  // select tile t; return cycles until ready
  task automatic sel(int t, logic f, output int lat);
    sel_done = 1; sel_found = f; sel_tile = 3'(t);
    @(posedge clk); #1;
    sel_done = 0;
    lat = 1;
    while (!ready && lat < 20) begin
      if (f) chk(pwr_en == NT'(1 << t), "only the selected tile is powered while waking");
      @(posedge clk); #1;
      lat++;
    end
    @(negedge clk);
  endtask

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int lat;
    sel_tile = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    chk(pwr_en == 0 && !ready, "all tiles gated after reset");
    for (int k = 0; k < 30; k++) begin
      int t;
      logic was_on;
      t = $urandom % NT;
      was_on = pwr_en[t];
      sel(t, 1'b1, lat);
      chk(pwr_en == NT'(1 << t), "selected tile powered");
      chk(lat == (was_on ? 1 : WAKE + 1), $sformatf("wake latency %0d (was_on %0b)", lat, was_on));
    end
    sel_done = 1; sel_found = 0;
    @(posedge clk); #1;
    sel_done = 0;
    chk(pwr_en == 0 && !ready, "no tile found gates all");
    @(negedge clk);
    sel(2, 1'b1, lat);
    all_off = 1;
    @(posedge clk); #1;
    all_off = 0;
    chk(pwr_en == 0 && !ready, "all_off gates all");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
