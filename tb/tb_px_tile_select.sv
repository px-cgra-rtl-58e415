// tb_px_tile_select: self-checking test of the tile selection unit.
// Fills the table with random entries (some invalid), then issues random
// requests. The expected tile is worked out here by scanning the entries of
// the application: among valid entries whose quality loss does not exceed
// the constraint, the highest utilization wins, the lower tile on a tie.
// Checks the one-cycle response, found / not found, and a tie.
module tb_px_tile_select;
  localparam int NT = 5, NA = 8;
  logic clk = 0, rst_n = 0, lut_we = 0, lut_valid, req = 0;
  logic [2:0] lut_app, lut_tile, app, tile;
  logic [6:0] lut_qloss, lut_util, q_const;
  logic done, found;
  logic       r_valid [NA][NT];
  int         r_q [NA][NT], r_u [NA][NT];
  int checks = 0, failures = 0, n_found = 0, n_none = 0;

  always #5 clk = ~clk;

  px_tile_select #(.N_TILES(NT), .N_APPS(NA)) dut (.clk, .rst_n, .lut_we, .lut_app, .lut_tile,
    .lut_valid, .lut_qloss, .lut_util, .req, .app, .q_const, .done, .found, .tile);

  task automatic wr(int a, int t, logic v, int q, int u);
    lut_we = 1; lut_app = 3'(a); lut_tile = 3'(t); lut_valid = v;
    lut_qloss = 7'(q); lut_util = 7'(u);
    r_valid[a][t] = v; r_q[a][t] = q; r_u[a][t] = u;
    @(negedge clk);
    lut_we = 0;
  endtask

  task automatic ask(int a, int q);
    int best, bu;
    best = -1; bu = -1;
    for (int t = 0; t < NT; t++)
      if (r_valid[a][t] && r_q[a][t] <= q && r_u[a][t] > bu) begin best = t; bu = r_u[a][t]; end
    req = 1; app = 3'(a); q_const = 7'(q);
    @(posedge clk); #1;
    req = 0;
    checks += 2;
    if (!done) begin failures++; $display("FAIL no done"); end
    if (found !== (best >= 0) || (best >= 0 && int'(tile) != best)) begin
      failures++;
      $display("FAIL app %0d q %0d: got found=%0b tile=%0d exp %0d", a, q, found, tile, best);
    end
    if (best >= 0) n_found++; else n_none++;
    @(posedge clk); #1;
    checks++;
    if (done) begin failures++; $display("FAIL done longer than one cycle"); end
    @(negedge clk);
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    lut_app = '0; lut_tile = '0; lut_valid = 0; lut_qloss = '0; lut_util = '0; app = '0; q_const = '0;
    for (int a = 0; a < NA; a++) for (int t = 0; t < NT; t++) r_valid[a][t] = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    // empty table: nothing found
    ask(0, 100);
    for (int a = 0; a < NA; a++)
      for (int t = 0; t < NT; t++)
        wr(a, t, ($urandom % 5) != 0, $urandom % 40, $urandom % 101);
    // a tie on application 7: tiles 1 and 3 equal, tile 1 must win
    wr(7, 1, 1'b1, 5, 90); wr(7, 3, 1'b1, 5, 90);
    for (int t = 0; t < NT; t++) if (t != 1 && t != 3) wr(7, t, 1'b1, 0, 10);
    ask(7, 10);
    checks++;
    if (tile != 3'd1) begin failures++; $display("FAIL tie rule"); end
    for (int k = 0; k < 400; k++) ask($urandom % NA, $urandom % 45);
    checks++;
    if (n_found == 0 || n_none == 0) begin failures++; $display("FAIL found/none not both seen"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
