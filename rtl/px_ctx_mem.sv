// px_ctx_mem: context memory subsystem.
//
// Holds DEPTH tile-wide context words (one 76-bit context per PAC, four PACs
// per tile). The mapping flow produces, for every application and every output
// quality constraint, the context words of the tile that will run it; the
// host writes them here through the write port (wr_en, wr_addr, wr_data, one
// word per cycle). To configure a tile the host asserts ld_en with a word
// address and the target tile; one cycle later the word is on ctx_out and
// exactly one bit of tile_we (the target tile's) is high for that cycle, which
// writes the word into that tile's context registers. The array is
// uninitialised; words that are loaded must have been written first.
//
// That contexts are stored in a context memory and copied into context
// registers follows the architecture; the depth, the one-word-per-tile
// organisation and the one-cycle load timing are this design's choices.
module px_ctx_mem
  import px_pkg::*;
#(
  parameter int unsigned DEPTH   = 16,
  parameter int unsigned N_TILES = 5,
  localparam int unsigned AW     = $clog2(DEPTH),
  localparam int unsigned TW     = $clog2(N_TILES)
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  wr_en,
  input  logic [AW-1:0]         wr_addr,
  input  pac_ctx_t [N_PAC-1:0]  wr_data,
  input  logic                  ld_en,
  input  logic [AW-1:0]         ld_addr,
  input  logic [TW-1:0]         ld_tile,
  output pac_ctx_t [N_PAC-1:0]  ctx_out,
  output logic [N_TILES-1:0]    tile_we
);

  pac_ctx_t [N_PAC-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (wr_en) mem[wr_addr] <= wr_data;
    if (ld_en) ctx_out <= mem[ld_addr];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) tile_we <= '0;
    else begin
      tile_we <= '0;
      if (ld_en && 32'(ld_tile) < N_TILES) tile_we[ld_tile] <= 1'b1;
    end
  end

  // A load writes at most one tile, for exactly one cycle.
  assert property (@(posedge clk) disable iff (!rst_n) $onehot0(tile_we))
    else $error("px_ctx_mem: context written into several tiles");
  assert property (@(posedge clk) disable iff (!rst_n) !ld_en |=> tile_we == '0)
    else $error("px_ctx_mem: tile write without a load");

endmodule
