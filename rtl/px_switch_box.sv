// px_switch_box: the interconnect inside a PAC.
//
// Eight sources meet in the switch box: the output registers of ALU0..ALU3
// (source numbers 0..3) and the PAC inputs from the north, east, south and west
// neighbours (4..7). For every ALU the 3-bit MUX_A and MUX_B fields of its
// context pick its two operands among them. For every PAC output port d the
// switch box offers the value to be registered at the next edge: the new result
// of the lowest-numbered active ALU whose WR code names port d (WR = 2 + d), or
// else the source picked by the 3-bit switch field sw[d] of the PAC context, so
// a PAC can also forward a neighbour's value. Purely combinational; the
// registers are in the ALUs and in px_pac.
//
// The switch box itself, the 3-bit MUX_A / MUX_B operand selects and the WR
// destination field follow the architecture; the source numbering, the WR
// codes and the switch field are this design's choices.
module px_switch_box
  import px_pkg::*;
(
  input  pac_ctx_t                ctx,
  input  data_t [N_ALU-1:0]       alu_q,
  input  data_t [N_ALU-1:0]       alu_result,
  input  logic  [N_ALU-1:0]       alu_act,
  input  data_t [N_DIR-1:0]       pac_in,
  output data_t [N_ALU-1:0]       op_a,
  output data_t [N_ALU-1:0]       op_b,
  output data_t [N_DIR-1:0]       port_next
);

  data_t [7:0] src;
  always_comb begin
    for (int i = 0; i < 4; i++) src[i]     = alu_q[i];
    for (int d = 0; d < 4; d++) src[4 + d] = pac_in[d];
  end

  always_comb
    for (int i = 0; i < N_ALU; i++) begin
      op_a[i] = src[ctx.alu[i].mux_a];
      op_b[i] = src[ctx.alu[i].mux_b];
    end

  always_comb
    for (int d = 0; d < N_DIR; d++) begin
      port_next[d] = src[ctx.sw[d]];
      for (int i = N_ALU - 1; i >= 0; i--)
        if (alu_act[i] && ctx.alu[i].wr == WR_OUT_N + 3'(d))
          port_next[d] = alu_result[i];
    end

endmodule
