// asp_ih_chromadc: datapath of the iH_CHROMADC instruction, the 2x2 inverse
// Hadamard transform of the four DC coefficients of a chroma component.
//
// dc_in holds the 2x2 matrix [[c0, c1], [c2, c3]] as dc_in[0..3]; the result
// f = H c H with H = [[1,1],[1,-1]] is returned in the same order:
//   f00 = c0+c1+c2+c3   f01 = c0-c1+c2-c3
//   f10 = c0+c1-c2-c3   f11 = c0-c1-c2+c3
// No scaling (dequantisation follows in software); 16-bit results. The
// extension unit keeps the four DC values in row 0 of its 4x4 block special
// register; that placement is this implementation's choice, the transform
// itself is the standard H.264 chroma DC one. Combinational, E stage.
module asp_ih_chromadc
  import asp_pkg::*;
(
  input  coef_t [3:0] dc_in,
  output coef_t [3:0] dc_out
);
  typedef logic signed [17:0] wide_t;
  wide_t s0, d0, s1, d1;

  always_comb begin
    s0 = wide_t'($signed(dc_in[0])) + wide_t'($signed(dc_in[1]));
    d0 = wide_t'($signed(dc_in[0])) - wide_t'($signed(dc_in[1]));
    s1 = wide_t'($signed(dc_in[2])) + wide_t'($signed(dc_in[3]));
    d1 = wide_t'($signed(dc_in[2])) - wide_t'($signed(dc_in[3]));
    dc_out[0] = 16'(s0 + s1);
    dc_out[1] = 16'(d0 + d1);
    dc_out[2] = 16'(s0 - s1);
    dc_out[3] = 16'(d0 - d1);
  end
endmodule
