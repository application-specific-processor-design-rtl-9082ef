// asp_muladd_coeff: datapath of the MULADD_COEFF instruction, two
// multiply-accumulate lanes for interpolation:
//   acc[63:32] += opnd[15:0]  x C0
//   acc[31:0]  += opnd[47:32] x C1
// The two lanes are independent 32-bit accumulators (no carry between them).
// The 64-bit operand is formed by the caller from a register pair and the
// accumulator is a 64-bit special register held outside this block; C0 and C1
// come from a special register as well. Products are signed 16x16; each lane
// wraps modulo 2^32. Lane signedness, the register pair and where C0/C1 live
// are this implementation's own choices. Combinational, E stage.
module asp_muladd_coeff (
  input  logic [63:0] acc_in,
  input  logic [63:0] opnd,
  input  logic [15:0] c0,
  input  logic [15:0] c1,
  output logic [63:0] acc_out
);
  logic [31:0] p0, p1;
  always_comb begin
    p0 = 32'($signed(opnd[15:0])  * $signed(c0));
    p1 = 32'($signed(opnd[47:32]) * $signed(c1));
    acc_out[63:32] = acc_in[63:32] + p0;
    acc_out[31:0]  = acc_in[31:0]  + p1;
  end
endmodule
