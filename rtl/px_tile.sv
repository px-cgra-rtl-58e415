// px_tile: one PX-CGRA tile, a 2 x 2 mesh of identical PACs.
//
// All PACs of a tile are of the same type (N_APX approximate and N_CFG
// configurable ALUs each), so a tile covers one quality range; a PX-CGRA
// holds several tiles of different types. PAC (r, c) has index r*TILE_COLS+c.
// Neighbouring PACs are joined in both directions: the east output of (r, c)
// is the west input of (r, c+1), the south output of (r, c) the north input of
// (r+1, c), and the reverse.
//
// The PAC sides on the tile boundary form the tile's edge ports, where the
// data memory subsystem attaches. Edge numbering (N_EDGE = 8):
//   0 .. C-1             north side of row 0, column 0 .. C-1
//   C .. C+R-1           east side of column C-1, row 0 .. R-1
//   C+R .. 2C+R-1        south side of row R-1, column 0 .. C-1
//   2C+R .. 2C+2R-1      west side of column 0, row 0 .. R-1
// edge_in[k] drives the PAC input on that side and edge_out[k] is that PAC's
// registered output port on the same side.
//
// Context: ctx_we writes ctx_in[p] into the context register of every PAC p
// in the same cycle (one tile-wide context word). en = 0 power-gates the whole
// tile (every register cleared, outputs zero). n_active is the number of ALUs
// operating under the loaded context, 0 .. 16; n_active / 16 is the tile's
// utilization ratio.
module px_tile
  import px_pkg::*;
#(
  parameter int unsigned N_APX = 0,
  parameter int unsigned N_CFG = 0
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                en,
  input  logic                ctx_we,
  input  pac_ctx_t [N_PAC-1:0] ctx_in,
  input  data_t [N_EDGE-1:0]  edge_in,
  output data_t [N_EDGE-1:0]  edge_out,
  output logic  [4:0]         n_active
);

  localparam int unsigned R = TILE_ROWS;
  localparam int unsigned C = TILE_COLS;

  data_t [N_PAC-1:0][N_DIR-1:0] pin, pout;
  logic  [N_PAC-1:0][2:0]       pact;

  for (genvar r = 0; r < R; r++) begin : g_row
    for (genvar c = 0; c < C; c++) begin : g_col
      localparam int unsigned P = r * C + c;
      // North input
      if (r == 0) begin : g_n_edge
        assign pin[P][DIR_N] = edge_in[c];
        assign edge_out[c]   = pout[P][DIR_N];
      end else begin : g_n_mesh
        assign pin[P][DIR_N] = pout[P - C][DIR_S];
      end
      // East input
      if (c == C - 1) begin : g_e_edge
        assign pin[P][DIR_E]   = edge_in[C + r];
        assign edge_out[C + r] = pout[P][DIR_E];
      end else begin : g_e_mesh
        assign pin[P][DIR_E] = pout[P + 1][DIR_W];
      end
      // South input
      if (r == R - 1) begin : g_s_edge
        assign pin[P][DIR_S]       = edge_in[C + R + c];
        assign edge_out[C + R + c] = pout[P][DIR_S];
      end else begin : g_s_mesh
        assign pin[P][DIR_S] = pout[P + C][DIR_N];
      end
      // West input
      if (c == 0) begin : g_w_edge
        assign pin[P][DIR_W]           = edge_in[2 * C + R + r];
        assign edge_out[2 * C + R + r] = pout[P][DIR_W];
      end else begin : g_w_mesh
        assign pin[P][DIR_W] = pout[P - 1][DIR_E];
      end

      px_pac #(.N_APX(N_APX), .N_CFG(N_CFG)) u_pac (
        .clk(clk), .rst_n(rst_n), .en(en), .ctx_we(ctx_we), .ctx_in(ctx_in[P]),
        .in_port(pin[P]), .out_port(pout[P]), .n_active(pact[P])
      );
    end
  end

  always_comb begin
    n_active = '0;
    for (int p = 0; p < N_PAC; p++) n_active = n_active + 5'(pact[p]);
  end

endmodule
