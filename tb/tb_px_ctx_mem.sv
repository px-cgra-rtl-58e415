// tb_px_ctx_mem: self-checking test of the context memory.
// Writes random tile-wide context words to every address, then loads them in
// random order into random tiles; each load must put the stored word on
// ctx_out one cycle later together with a one-cycle, one-hot tile_we for the
// target tile, and nothing else.
module tb_px_ctx_mem;
  import px_pkg::*;

  localparam int DEPTH = 16, NT = 5;
  logic clk = 0, rst_n = 0, wr_en = 0, ld_en = 0;
  logic [3:0] wr_addr, ld_addr;
  logic [2:0] ld_tile;
  pac_ctx_t [N_PAC-1:0] wr_data, ctx_out;
  logic [NT-1:0] tile_we;
  pac_ctx_t [N_PAC-1:0] ref_mem [DEPTH];
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  px_ctx_mem #(.DEPTH(DEPTH), .N_TILES(NT)) dut (.clk, .rst_n, .wr_en, .wr_addr, .wr_data,
    .ld_en, .ld_addr, .ld_tile, .ctx_out, .tile_we);

  function automatic pac_ctx_t [N_PAC-1:0] rnd_word();
    logic [N_PAC*PAC_CTX_W-1:0] v;
    for (int k = 0; k < N_PAC * PAC_CTX_W; k += 32) v[k +: 32] = $urandom;
    return v;
  endfunction

  initial begin
    repeat (3000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    wr_addr = '0; ld_addr = '0; ld_tile = '0; wr_data = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    for (int a = 0; a < DEPTH; a++) begin
      wr_en = 1; wr_addr = 4'(a); wr_data = rnd_word(); ref_mem[a] = wr_data;
      @(negedge clk);
    end
    wr_en = 0;
    checks++;
    if (tile_we != 0) begin failures++; $display("FAIL tile_we without a load"); end
    for (int k = 0; k < 100; k++) begin
      int a, t;
      a = $urandom % DEPTH; t = $urandom % NT;
      ld_en = 1; ld_addr = 4'(a); ld_tile = 3'(t);
      @(posedge clk); #1;
      ld_en = 0;
      checks += 2;
      if (ctx_out !== ref_mem[a]) begin failures++; $display("FAIL word %0d", a); end
      if (tile_we !== NT'(1 << t)) begin failures++; $display("FAIL tile_we %b for tile %0d", tile_we, t); end
      @(posedge clk); #1;
      checks++;
      if (tile_we != 0) begin failures++; $display("FAIL tile_we longer than one cycle"); end
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
