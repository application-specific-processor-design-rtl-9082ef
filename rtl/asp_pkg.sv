// asp_pkg: types and constants shared by the H.264 instruction-extension unit.
//
// The extension adds video instructions to a five-stage RISC core. Each
// instruction reaches the unit as an opcode from the asp_op_e enum, two 32-bit
// source operands (ars, art, read from the core's general registers) and an
// 8-bit immediate. The opcode list follows the instruction tables of the
// design (MUL32, CLP8, MULADD_COEFF, SHOWBITS, unsigned divide and mod, iTRANS,
// iH_LUMADC, iH_CHROMADC). The encodings, the FLUSHBITS companion of
// SHOWBITS, and the RUR/WUR user-register moves are this implementation's own.
//
// User (special) registers, addressed by the immediate of RUR/WUR:
//   0..7   BLK word k = {coef[2k+1], coef[2k]}; coef index = row*4 + col,
//          16-bit signed coefficients of the 4x4 block used by iTRANS/iH_*
//   8      ACC_LO  low half of the 64-bit MULADD_COEFF accumulator
//   9      ACC_HI  high half of the accumulator
//   10     COEFF   {C1, C0}, two signed 16-bit MULADD_COEFF coefficients
//   11     BITPOS  absolute bit position in the stream (SHOWBITS/FLUSHBITS)
package asp_pkg;

  typedef enum logic [3:0] {
    OP_NOP         = 4'd0,
    OP_MUL32       = 4'd1,
    OP_CLP8        = 4'd2,
    OP_MULADD      = 4'd3,
    OP_SHOWBITS    = 4'd4,
    OP_FLUSHBITS   = 4'd5,
    OP_UDIV        = 4'd6,
    OP_UMOD        = 4'd7,
    OP_ITRANS      = 4'd8,
    OP_IH_LUMADC   = 4'd9,
    OP_IH_CHROMADC = 4'd10,
    OP_RUR         = 4'd11,
    OP_WUR         = 4'd12
  } asp_op_e;

  typedef logic signed [15:0] coef_t;
  // 4x4 block, element [row][col]
  typedef coef_t [3:0][3:0] blk_t;

  localparam logic [7:0] UR_BLK0   = 8'd0;
  localparam logic [7:0] UR_ACC_LO = 8'd8;
  localparam logic [7:0] UR_ACC_HI = 8'd9;
  localparam logic [7:0] UR_COEFF  = 8'd10;
  localparam logic [7:0] UR_BITPOS = 8'd11;

endpackage
