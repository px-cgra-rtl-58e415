// px_pkg: types and constants shared by the PX-CGRA datapath.
//
// The ALU function set (15 functions) follows the architecture, plus a NOP
// added here; the 5-bit opcode width and the 14-bit per-ALU context field with its
// bit positions (opcode [4:0], MUX_B [7:5], MUX_A [10:8], WR [13:11]) and the
// optional m-bit OM field above bit 13 follow the PAC context-word layout. The
// numeric opcode values, the 16-bit data width, the meaning of each WR code,
// the switch field of the PAC context and the OM bit encoding are choices of
// this design, while the order of the four accuracy levels follows the
// architecture:
//   OM[0] = 1 puts the adder in approximate mode, OM[1] = 1 the multiplier,
//   so OM = 0,1,2,3 are accuracy levels 1,2,3,4 (exact/exact, approximate
//   add, approximate multiply, both approximate).
package px_pkg;

  // Datapath width of every ALU, PAC port and tile port.
  parameter int unsigned DATA_W = 16;

  // ALUs per PAC (PAC1..PAC5 all hold four: A + E = 4).
  parameter int unsigned N_ALU = 4;

  // Accuracy operating-mode bits per configurable ALU (m).
  parameter int unsigned OM_W = 2;

  // Per-ALU context field: 14 bits plus the OM field.
  parameter int unsigned ALU_CTX_W = 14 + OM_W;

  // Switch field of a PAC context: one 3-bit source select per output port.
  parameter int unsigned N_DIR     = 4;
  parameter int unsigned SW_CTX_W  = 3 * N_DIR;

  // Whole PAC context register.
  parameter int unsigned PAC_CTX_W = N_ALU * ALU_CTX_W + SW_CTX_W;

  // PACs per tile (2 x 2).
  parameter int unsigned TILE_ROWS = 2;
  parameter int unsigned TILE_COLS = 2;
  parameter int unsigned N_PAC     = TILE_ROWS * TILE_COLS;

  // Edge ports of a tile: every PAC side on the tile boundary.
  parameter int unsigned N_EDGE = 2 * (TILE_ROWS + TILE_COLS);

  typedef logic [DATA_W-1:0] data_t;

  // ALU kinds fixed at design time.
  typedef enum logic [1:0] {
    ALU_EXACT  = 2'd0,
    ALU_APPROX = 2'd1,  // fixed-level approximate
    ALU_CONFIG = 2'd2   // accuracy configurable through OM
  } alu_kind_e;

  typedef enum logic [4:0] {
    OP_NOP = 5'd0,
    OP_ADD = 5'd1,
    OP_SUB = 5'd2,
    OP_MUL = 5'd3,
    OP_MAC = 5'd4,
    OP_ABS = 5'd5,
    OP_AND = 5'd6,
    OP_OR  = 5'd7,
    OP_XOR = 5'd8,
    OP_NOT = 5'd9,
    OP_GT  = 5'd10,
    OP_LT  = 5'd11,
    OP_EQ  = 5'd12,
    OP_LSR = 5'd13,
    OP_LSL = 5'd14,
    OP_ASR = 5'd15
  } opcode_e;

  // Directions of the PAC mesh ports.
  typedef enum logic [1:0] {
    DIR_N = 2'd0,
    DIR_E = 2'd1,
    DIR_S = 2'd2,
    DIR_W = 2'd3
  } dir_e;

  // Switch-box source numbers, used by MUX_A, MUX_B and the switch field:
  // 0..3 = output register of ALU0..ALU3, 4..7 = PAC input N, E, S, W.

  // WR codes: destination of an ALU result.
  //   0     : no write, the ALU is idle (not counted as operating)
  //   1     : the ALU output register only
  //   2..5  : the ALU output register and PAC output port N, E, S, W
  //   6, 7  : reserved, behave as 1
  parameter logic [2:0] WR_NONE  = 3'd0;
  parameter logic [2:0] WR_LOCAL = 3'd1;
  parameter logic [2:0] WR_OUT_N = 3'd2;

  typedef struct packed {
    logic [OM_W-1:0] om;
    logic [2:0]      wr;
    logic [2:0]      mux_a;
    logic [2:0]      mux_b;
    logic [4:0]      opcode;
  } alu_ctx_t;

  typedef struct packed {
    logic [N_DIR-1:0][2:0]     sw;   // sw[d] = source of output port d
    alu_ctx_t [N_ALU-1:0]      alu;  // alu[i] = context of ALU i
  } pac_ctx_t;

  // An ALU is operating when it writes a result.
  function automatic logic alu_active(alu_ctx_t c);
    return (c.wr != WR_NONE) && (c.opcode != OP_NOP);
  endfunction

endpackage
