// px_power_ctrl: power-gating control of the PX-CGRA tiles.
//
// Only the tile chosen by the tile selection unit is powered; all others are
// power gated. On a selection result (sel_done with sel_found) the controller
// powers the selected tile and gates every other one. A tile that was off
// needs WAKE cycles before it may be used; ready is low from the selection
// until then (a reselection of the tile that is already on keeps it ready).
// sel_done without sel_found, or all_off, gates every tile. pwr_en is a
// register, one bit per tile, driving the tiles' enable inputs.
//
// That unused tiles are power gated follows the architecture; the wake-up
// delay, its length and the ready flag are this design's choices.
module px_power_ctrl #(
  parameter int unsigned N_TILES = 5,
  parameter int unsigned WAKE    = 4,
  localparam int unsigned TW     = $clog2(N_TILES),
  localparam int unsigned CW     = $clog2(WAKE + 1)
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               sel_done,
  input  logic               sel_found,
  input  logic [TW-1:0]      sel_tile,
  input  logic               all_off,
  output logic [N_TILES-1:0] pwr_en,
  output logic               ready
);

  logic [CW-1:0] wake_cnt;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pwr_en   <= '0;
      wake_cnt <= '0;
      ready    <= 1'b0;
    end else if (all_off || (sel_done && !sel_found)) begin
      pwr_en   <= '0;
      wake_cnt <= '0;
      ready    <= 1'b0;
    end else if (sel_done) begin
      pwr_en <= '0;
      pwr_en[sel_tile] <= 1'b1;
      if (pwr_en[sel_tile]) begin
        wake_cnt <= '0;
        ready    <= 1'b1;
      end else begin
        wake_cnt <= CW'(WAKE);
        ready    <= 1'b0;
      end
    end else if (wake_cnt != '0) begin
      wake_cnt <= wake_cnt - 1'b1;
      ready    <= (wake_cnt == CW'(1));
    end
  end

  assert property (@(posedge clk) disable iff (!rst_n) $onehot0(pwr_en))
    else $error("px_power_ctrl: more than one tile powered");

endmodule
