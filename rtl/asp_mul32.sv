// asp_mul32: datapath of the MUL32 instruction, arr[31:0] = ars[15:0] x art[15:0].
//
// One combinational 16x16 multiplier; the product of two 16-bit halves fits
// 32 bits exactly. The instruction replaces the software 32-bit multiply
// routine, which is signed, so the operands are taken as signed by default;
// SIGNED = 0 gives the unsigned product. The choice of signedness is this
// implementation's own. Timing: purely combinational, used in the E stage.
module asp_mul32 #(
  parameter bit SIGNED = 1'b1
) (
  input  logic [31:0] ars,
  input  logic [31:0] art,
  output logic [31:0] arr
);
  always_comb begin
    if (SIGNED) arr = 32'($signed(ars[15:0]) * $signed(art[15:0]));
    else        arr = 32'(ars[15:0] * art[15:0]);
  end
endmodule
