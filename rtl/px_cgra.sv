// px_cgra: Polymorphic Approximate CGRA (PX-CGRA), top level.
//
// The array is a row of N_TILES heterogeneous tiles. Every tile is a 2 x 2
// mesh of identical PACs, and tile t is built from PACs with t fixed-level
// approximate and 4-t exact ALUs, so the default five tiles are the five
// studied cluster types PAC1 (all exact) .. PAC5 (all approximate). A host
// (the main processor, outside this block) runs an application like this:
//   1. write the tile-selection table (lut_*) and the context words (ctx_wr_*);
//   2. request a tile for an application and its tolerable quality loss
//      (sel_req, app_id, q_const): the tile selection unit picks the tile of
//      highest utilization ratio that meets the constraint, and the
//      power-gating control powers that tile and gates all others;
//   3. once pwr_ready is high, load a context word into the selected tile
//      (ctx_ld_en, ctx_ld_addr; written into its PACs one cycle later);
//   4. stream operands into the tile edges (data_in) and read results from
//      them (data_out).
// data_in goes to the edge inputs of every tile; data_out and n_active are
// those of the selected tile. n_active (0 .. 16) is the number of ALUs the
// loaded context keeps busy. The data memory subsystem, which would drive
// data_in and take data_out, is outside this block.
//
// The tile types, the selection unit, the power gating and the context memory
// follow the architecture; a single powered tile at a time, the broadcast of
// the edge inputs and the port-level interface are this design's choices.
module px_cgra
  import px_pkg::*;
#(
  parameter int unsigned N_TILES   = 5,
  parameter int unsigned CTX_DEPTH = 16,
  parameter int unsigned N_APPS    = 8,
  parameter int unsigned WAKE      = 4,
  localparam int unsigned TW       = $clog2(N_TILES),
  localparam int unsigned CAW      = $clog2(CTX_DEPTH),
  localparam int unsigned PAW      = $clog2(N_APPS)
) (
  input  logic                  clk,
  input  logic                  rst_n,
  // context memory, host side
  input  logic                  ctx_wr_en,
  input  logic [CAW-1:0]        ctx_wr_addr,
  input  pac_ctx_t [N_PAC-1:0]  ctx_wr_data,
  input  logic                  ctx_ld_en,
  input  logic [CAW-1:0]        ctx_ld_addr,
  // tile selection table, host side
  input  logic                  lut_we,
  input  logic [PAW-1:0]        lut_app,
  input  logic [TW-1:0]         lut_tile,
  input  logic                  lut_valid,
  input  logic [6:0]            lut_qloss,
  input  logic [6:0]            lut_util,
  // tile selection request
  input  logic                  sel_req,
  input  logic [PAW-1:0]        app_id,
  input  logic [6:0]            q_const,
  input  logic                  all_off,
  output logic                  sel_done,
  output logic                  sel_found,
  output logic [TW-1:0]         sel_tile,
  output logic [N_TILES-1:0]    pwr_en,
  output logic                  pwr_ready,
  // data memory subsystem side
  input  data_t [N_EDGE-1:0]    data_in,
  output data_t [N_EDGE-1:0]    data_out,
  output logic  [4:0]           n_active
);

  initial assert (N_TILES >= 1 && N_TILES <= N_ALU + 1)
    else $error("px_cgra: N_TILES must be 1 .. %0d", N_ALU + 1);

  // Tile selection and power gating.
  px_tile_select #(.N_TILES(N_TILES), .N_APPS(N_APPS)) u_sel (
    .clk(clk), .rst_n(rst_n),
    .lut_we(lut_we), .lut_app(lut_app), .lut_tile(lut_tile),
    .lut_valid(lut_valid), .lut_qloss(lut_qloss), .lut_util(lut_util),
    .req(sel_req), .app(app_id), .q_const(q_const),
    .done(sel_done), .found(sel_found), .tile(sel_tile)
  );

  px_power_ctrl #(.N_TILES(N_TILES), .WAKE(WAKE)) u_pwr (
    .clk(clk), .rst_n(rst_n), .sel_done(sel_done), .sel_found(sel_found),
    .sel_tile(sel_tile), .all_off(all_off), .pwr_en(pwr_en), .ready(pwr_ready)
  );

  // Context memory: loads go to the selected tile.
  pac_ctx_t [N_PAC-1:0] ctx_bus;
  logic [N_TILES-1:0]   tile_we;

  px_ctx_mem #(.DEPTH(CTX_DEPTH), .N_TILES(N_TILES)) u_ctx (
    .clk(clk), .rst_n(rst_n),
    .wr_en(ctx_wr_en), .wr_addr(ctx_wr_addr), .wr_data(ctx_wr_data),
    .ld_en(ctx_ld_en), .ld_addr(ctx_ld_addr), .ld_tile(sel_tile),
    .ctx_out(ctx_bus), .tile_we(tile_we)
  );

  // The tiles.
  data_t [N_TILES-1:0][N_EDGE-1:0] t_out;
  logic  [N_TILES-1:0][4:0]        t_act;

  for (genvar t = 0; t < N_TILES; t++) begin : g_tile
    px_tile #(.N_APX(t), .N_CFG(0)) u_tile (
      .clk(clk), .rst_n(rst_n), .en(pwr_en[t]),
      .ctx_we(tile_we[t]), .ctx_in(ctx_bus),
      .edge_in(data_in), .edge_out(t_out[t]), .n_active(t_act[t])
    );
  end

  assign data_out = t_out[sel_tile];
  assign n_active = t_act[sel_tile];

endmodule
