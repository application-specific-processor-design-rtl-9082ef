// asp_clp8: datapath of the CLP8 instruction, which saturates a signed 32-bit
// value to the 8-bit pixel range: arr = (ars < 0) ? 0 : (ars > 0xff ? 0xff : ars).
//
// Used after interpolation and after adding a residual to a prediction. The
// function is exactly the one the instruction table gives; it is a
// comparator on the sign bit and on bits [30:8]. Bits [31:8] of arr are
// always zero; the 32-bit width is kept because the result goes to a 32-bit
// general register. Combinational, E stage.
module asp_clp8 (
  input  logic [31:0] ars,
  output logic [31:0] arr
);
  always_comb begin
    if (ars[31])           arr = 32'd0;
    else if (|ars[30:8])   arr = 32'h0000_00ff;
    else                   arr = {24'd0, ars[7:0]};
  end
endmodule
