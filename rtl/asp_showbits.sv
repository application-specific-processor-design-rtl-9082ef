// asp_showbits: bit-stream access for entropy decoding (SHOWBITS and its
// bit-position companion FLUSHBITS).
//
// The stream is read most-significant bit first. The caller supplies two
// consecutive 32-bit stream words, win_hi (the word holding the current bit)
// and win_lo (the next one), and the absolute bit position bitpos of the next
// unread bit; only bitpos[4:0] selects within the window. SHOWBITS returns the
// next nbits bits (0..32) right-aligned without consuming them; FLUSHBITS
// advances the position: next_pos = bitpos + nbits. A single instruction thus
// replaces the shift/mask/position arithmetic of the software routine. The
// design names the function only; the window-of-two-words form is this
// implementation's own. Combinational, E stage.
module asp_showbits (
  input  logic [31:0] win_hi,
  input  logic [31:0] win_lo,
  input  logic [31:0] bitpos,
  input  logic [5:0]  nbits,
  output logic [31:0] bits,
  output logic [31:0] next_pos
);
  logic [63:0] aligned;
  always_comb begin
    aligned  = {win_hi, win_lo} << bitpos[4:0];
    if (nbits == 6'd0)      bits = 32'd0;
    else if (nbits >= 6'd32) bits = aligned[63:32];
    else                    bits = aligned[63:32] >> (6'd32 - nbits);
    next_pos = bitpos + 32'(nbits > 6'd32 ? 6'd32 : nbits);
  end
endmodule
