// px_tile_select: PX-CGRA tile selection unit.
//
// A look-up table holds, for every application (N_APPS) and every tile
// (N_TILES), what the offline mapping found for running that application on
// that tile: a valid bit, the output quality degradation it causes (percent)
// and the utilization ratio it reaches (percent of operating ALUs). Given an
// application and its tolerable output quality degradation, the unit picks,
// among the valid entries whose degradation does not exceed the constraint,
// the tile with the highest utilization ratio, which is the one that saves the
// most energy; a tie goes to the lower tile index. If no entry qualifies,
// found is 0.
//
// Timing: the host writes one entry per cycle (lut_we). A request (req with
// app and q_const) is answered one cycle later by a one-cycle done pulse with
// found and tile, which stay valid until the next request.
//
// The table contents (utilization ratio, output quality) and the selection
// rule follow the architecture; the table size, the percent encoding and the
// tie rule are this design's choices.
module px_tile_select #(
  parameter int unsigned N_TILES = 5,
  parameter int unsigned N_APPS  = 8,
  localparam int unsigned TW     = $clog2(N_TILES),
  localparam int unsigned AW     = $clog2(N_APPS)
) (
  input  logic          clk,
  input  logic          rst_n,
  // table write port
  input  logic          lut_we,
  input  logic [AW-1:0] lut_app,
  input  logic [TW-1:0] lut_tile,
  input  logic          lut_valid,
  input  logic [6:0]    lut_qloss,
  input  logic [6:0]    lut_util,
  // selection request
  input  logic          req,
  input  logic [AW-1:0] app,
  input  logic [6:0]    q_const,
  output logic          done,
  output logic          found,
  output logic [TW-1:0] tile
);

  typedef struct packed {
    logic       valid;
    logic [6:0] qloss;
    logic [6:0] util;
  } entry_t;

  entry_t lut [N_APPS][N_TILES];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int a = 0; a < int'(N_APPS); a++)
        for (int t = 0; t < int'(N_TILES); t++)
          lut[a][t] <= '0;
    end else if (lut_we && 32'(lut_tile) < N_TILES) begin
      lut[lut_app][lut_tile] <= '{valid: lut_valid, qloss: lut_qloss, util: lut_util};
    end
  end

  logic          best_found;
  logic [TW-1:0] best_tile;
  always_comb begin
    logic [6:0] best_util;
    best_found = 1'b0;
    best_tile  = '0;
    best_util  = '0;
    for (int t = 0; t < int'(N_TILES); t++)
      if (lut[app][t].valid && lut[app][t].qloss <= q_const &&
          (!best_found || lut[app][t].util > best_util)) begin
        best_found = 1'b1;
        best_tile  = TW'(t);
        best_util  = lut[app][t].util;
      end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      done  <= 1'b0;
      found <= 1'b0;
      tile  <= '0;
    end else begin
      done <= req;
      if (req) begin
        found <= best_found;
        tile  <= best_tile;
      end
    end
  end

endmodule
