// px_alu: one ALU of a PAC, exact, fixed-level approximate or accuracy
// configurable.
//
// The ALU executes the functions of the architecture's function table: ADD,
// SUB, MUL, MAC, ABS (arithmetic), AND, OR, XOR, NOT, GT, LT, EQ (logical) and
// LSR, LSL, ASR (shift), selected by the 5-bit opcode of its context field.
// Which of three ALU types it is, is fixed at design time by KIND:
//   ALU_EXACT  : exact adder and multiplier,
//   ALU_APPROX : adder and multiplier always in approximate mode (fixed level),
//   ALU_CONFIG : accuracy configurable; context bit OM[0] switches the adder,
//                OM[1] the multiplier, giving four accuracy levels
//                (OM = 0 exact, 1 approximate add, 2 approximate multiply,
//                3 both), as in the architecture's accuracy-level table.
// Every addition of ADD, SUB, ABS and MAC goes through the one
// px_approx_adder, and MUL and MAC through the one px_approx_mult, so all
// arithmetic follows the accuracy mode. Logic, comparisons and shifts are
// always exact. Data are W-bit two's complement; GT and LT compare signed and
// return 1 or 0; MUL returns the low W bits of the product; the shift amount is
// the low log2(W) bits of operand b; NOT inverts operand a.
//
// Timing: operands a and b are combinational inputs; the result appears
// combinationally on `result` and is written into the output register `q` at
// the clock edge when the ALU is active (WR != 0 and opcode != NOP). MAC adds
// the product to the current q, so q is the accumulator. en = 0 models the
// power-gated state: q is cleared and nothing is written. The opcode values,
// the data width, MAC accumulating into the output register and the signed
// comparisons are this design's choices.
module px_alu
  import px_pkg::*;
#(
  parameter alu_kind_e   KIND = ALU_EXACT,
  parameter int unsigned W    = DATA_W
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         en,
  input  alu_ctx_t     ctx,
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  output logic [W-1:0] result,
  output logic [W-1:0] q,
  output logic         active
);

  localparam int unsigned SH_W = $clog2(W);

  logic add_apx, mul_apx;
  always_comb begin
    unique case (KIND)
      ALU_APPROX: begin add_apx = 1'b1;      mul_apx = 1'b1;      end
      ALU_CONFIG: begin add_apx = ctx.om[0]; mul_apx = ctx.om[1]; end
      default:    begin add_apx = 1'b0;      mul_apx = 1'b0;      end
    endcase
  end

  opcode_e op;
  assign op = opcode_e'(ctx.opcode);

  // Shared multiplier.
  logic [2*W-1:0] prod;
  px_approx_mult #(.W(W)) u_mul (.a(a), .b(b), .approx(mul_apx), .p(prod));

  // Shared adder with operand selection.
  logic [W-1:0] add_x, add_y, add_s;
  logic         add_ci, add_co;
  always_comb begin
    add_x  = a;
    add_y  = b;
    add_ci = 1'b0;
    unique case (op)
      OP_SUB: begin add_y = ~b; add_ci = 1'b1; end
      OP_MAC: begin add_x = prod[W-1:0]; add_y = q; end
      OP_ABS: begin add_x = '0; add_y = ~a; add_ci = 1'b1; end
      default: ;
    endcase
  end
  px_approx_adder #(.W(W)) u_add (
    .a(add_x), .b(add_y), .cin(add_ci), .approx(add_apx), .sum(add_s), .cout(add_co)
  );

  logic [SH_W-1:0] sh;
  assign sh = b[SH_W-1:0];

  always_comb begin
    unique case (op)
      OP_ADD, OP_SUB, OP_MAC: result = add_s;
      OP_MUL: result = prod[W-1:0];
      OP_ABS: result = a[W-1] ? add_s : a;
      OP_AND: result = a & b;
      OP_OR:  result = a | b;
      OP_XOR: result = a ^ b;
      OP_NOT: result = ~a;
      OP_GT:  result = W'($signed(a) > $signed(b));
      OP_LT:  result = W'($signed(a) < $signed(b));
      OP_EQ:  result = W'(a == b);
      OP_LSR: result = a >> sh;
      OP_LSL: result = a << sh;
      OP_ASR: result = W'($signed(a) >>> sh);
      default: result = q;
    endcase
  end

  assign active = alu_active(ctx);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)      q <= '0;
    else if (!en)    q <= '0;
    else if (active) q <= result;
  end

endmodule
