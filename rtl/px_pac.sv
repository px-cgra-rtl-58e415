// px_pac: Polymorphic-Approximated ALU Cluster.
//
// A PAC holds N_ALU = 4 ALUs, a switch box connecting them, and the context
// register that configures all of them. How many ALUs are fixed-level
// approximate, accuracy configurable or exact is fixed at design time:
// ALU0 .. ALU(N_APX-1) are approximate, the next N_CFG are configurable and the
// rest exact. With N_CFG = 0, N_APX = 0..4 gives the five studied cluster
// types PAC1..PAC5 (PACk has k-1 approximate and 5-k exact ALUs).
//
// The context register (PAC_CTX_W = 4 x 16 + 12 = 76 bits, layout in px_pkg)
// holds one 14-bit field plus a 2-bit OM field per ALU, and the switch field.
// It is written from ctx_in when ctx_we is high and reads all-zero (every ALU
// idle) after reset.
//
// Mesh ports: in_port[d] comes from the neighbour in direction d (N, E, S, W);
// out_port[d] is a register written every cycle from the switch box, so a value
// crosses from one PAC to the next in one clock and no combinational path runs
// between PACs. ALU operands are read combinationally from the ALU output
// registers and the input ports; an ALU result is registered at the next edge.
// en = 0 models a power-gated PAC: ALU registers, ports and context are cleared.
// n_active counts the ALUs that operate under the current context, the measure
// behind the architecture's utilization ratio.
//
// Registered output ports, the ALU order and the clear-on-power-down
// behaviour are this design's choices.
module px_pac
  import px_pkg::*;
#(
  parameter int unsigned N_APX = 0,
  parameter int unsigned N_CFG = 0
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                en,
  input  logic                ctx_we,
  input  pac_ctx_t            ctx_in,
  input  data_t [N_DIR-1:0]   in_port,
  output data_t [N_DIR-1:0]   out_port,
  output logic  [2:0]         n_active
);

  initial assert (N_APX + N_CFG <= N_ALU)
    else $error("px_pac: N_APX + N_CFG exceeds N_ALU");

  pac_ctx_t ctx;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)      ctx <= '0;
    else if (!en)    ctx <= '0;
    else if (ctx_we) ctx <= ctx_in;
  end

  data_t [N_ALU-1:0] op_a, op_b, alu_res, alu_q;
  logic  [N_ALU-1:0] alu_act;
  data_t [N_DIR-1:0] port_next;

  for (genvar i = 0; i < N_ALU; i++) begin : g_alu
    localparam alu_kind_e K = (i < N_APX)         ? ALU_APPROX :
                              (i < N_APX + N_CFG) ? ALU_CONFIG : ALU_EXACT;
    px_alu #(.KIND(K)) u_alu (
      .clk(clk), .rst_n(rst_n), .en(en), .ctx(ctx.alu[i]),
      .a(op_a[i]), .b(op_b[i]), .result(alu_res[i]), .q(alu_q[i]),
      .active(alu_act[i])
    );
  end

  px_switch_box u_sb (
    .ctx(ctx), .alu_q(alu_q), .alu_result(alu_res), .alu_act(alu_act),
    .pac_in(in_port), .op_a(op_a), .op_b(op_b), .port_next(port_next)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)   out_port <= '0;
    else if (!en) out_port <= '0;
    else          out_port <= port_next;
  end

  always_comb begin
    n_active = '0;
    for (int i = 0; i < N_ALU; i++) n_active = n_active + 3'(alu_act[i]);
  end

endmodule
