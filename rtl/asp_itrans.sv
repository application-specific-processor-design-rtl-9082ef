// asp_itrans: datapath of the iTRANS instruction, the H.264 4x4 inverse
// integer transform applied to the 4x4 coefficient block held in a special
// register.
//
// The transform is separable and uses only additions, subtractions and
// one-bit shifts. Each 1-D pass is the butterfly
//   e = x0 + x2      f = x0 - x2
//   g = (x1 >>> 1) - x3      h = x1 + (x3 >>> 1)
//   y0 = e + h   y1 = f + g   y2 = f - g   y3 = e - h
// applied first to every row and then to every column; each result is then
// rounded as (y + 32) >>> 6 to give the residual. Intermediates are 20 bits
// wide, enough for any 16-bit input; the rounded result is kept to 16 bits.
// The design gives the instruction's function; doing the final rounding
// inside the instruction is this implementation's choice.
// Combinational, E stage; blk is indexed [row][col].
module asp_itrans
  import asp_pkg::*;
(
  input  blk_t blk_in,
  output blk_t blk_out
);
  typedef logic signed [19:0] wide_t;

  function automatic void bfly(input wide_t x0, x1, x2, x3,
                               output wide_t y0, y1, y2, y3);
    wide_t e, f, g, h;
    e = x0 + x2;
    f = x0 - x2;
    g = (x1 >>> 1) - x3;
    h = x1 + (x3 >>> 1);
    y0 = e + h;
    y1 = f + g;
    y2 = f - g;
    y3 = e - h;
  endfunction

  wide_t rowp [4][4];
  wide_t colp [4][4];
  wide_t rnd;

  always_comb begin
    for (int r = 0; r < 4; r++)
      bfly(wide_t'($signed(blk_in[r][0])), wide_t'($signed(blk_in[r][1])),
           wide_t'($signed(blk_in[r][2])), wide_t'($signed(blk_in[r][3])),
           rowp[r][0], rowp[r][1], rowp[r][2], rowp[r][3]);
    for (int c = 0; c < 4; c++)
      bfly(rowp[0][c], rowp[1][c], rowp[2][c], rowp[3][c],
           colp[0][c], colp[1][c], colp[2][c], colp[3][c]);
    for (int r = 0; r < 4; r++)
      for (int c = 0; c < 4; c++) begin
        rnd = (colp[r][c] + wide_t'(32)) >>> 6;
        blk_out[r][c] = rnd[15:0];
      end
  end
endmodule
