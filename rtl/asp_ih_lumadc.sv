// asp_ih_lumadc: datapath of the iH_LUMADC instruction, the 4x4 inverse
// Hadamard transform of the sixteen luma DC coefficients of an intra 16x16
// macroblock, in place on the 4x4 block special register.
//
// Each 1-D pass is
//   y0 = x0 + x1 + x2 + x3   y1 = x0 + x1 - x2 - x3
//   y2 = x0 - x1 - x2 + x3   y3 = x0 - x1 + x2 - x3
// computed as two levels of adders, rows first and then columns. No scaling is
// applied: dequantisation follows in software. Results are kept to 16 bits
// (wrap). The design names the operation; the in-place register use and the
// 16-bit result are this implementation's choices. Combinational, E stage.
module asp_ih_lumadc
  import asp_pkg::*;
(
  input  blk_t blk_in,
  output blk_t blk_out
);
  typedef logic signed [19:0] wide_t;

  function automatic void had4(input wide_t x0, x1, x2, x3,
                               output wide_t y0, y1, y2, y3);
    wide_t s01, d01, s23, d23;
    s01 = x0 + x1;
    d01 = x0 - x1;
    s23 = x2 + x3;
    d23 = x2 - x3;
    y0 = s01 + s23;
    y1 = s01 - s23;
    y2 = d01 - d23;
    y3 = d01 + d23;
  endfunction

  wide_t rowp [4][4];
  wide_t colp [4][4];

  always_comb begin
    for (int r = 0; r < 4; r++)
      had4(wide_t'($signed(blk_in[r][0])), wide_t'($signed(blk_in[r][1])),
           wide_t'($signed(blk_in[r][2])), wide_t'($signed(blk_in[r][3])),
           rowp[r][0], rowp[r][1], rowp[r][2], rowp[r][3]);
    for (int c = 0; c < 4; c++)
      had4(rowp[0][c], rowp[1][c], rowp[2][c], rowp[3][c],
           colp[0][c], colp[1][c], colp[2][c], colp[3][c]);
    for (int r = 0; r < 4; r++)
      for (int c = 0; c < 4; c++)
        blk_out[r][c] = colp[r][c][15:0];
  end
endmodule
