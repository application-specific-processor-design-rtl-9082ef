// tb_asp_showbits: self-checking test of SHOWBITS/FLUSHBITS. Builds a random
// stream in a word array, then walks through it with random field lengths:
// the expected field is assembled bit by bit from the array, and the next
// position must equal the old one plus the length.
module tb_asp_showbits;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic [31:0] win_hi, win_lo, bitpos, bits, next_pos;
  logic [5:0]  nbits;
  asp_showbits dut (.win_hi, .win_lo, .bitpos, .nbits, .bits, .next_pos);

  logic [31:0] stream [64];

  function automatic logic stream_bit(int p);
    return stream[p / 32][31 - (p % 32)];
  endfunction

  initial begin
    logic [31:0] exp;
    int pos;
    foreach (stream[i]) stream[i] = $urandom;
    pos = 0;
    while (pos < 62 * 32) begin
      nbits  = 6'($urandom_range(0, 32));
      bitpos = 32'(pos);
      win_hi = stream[pos / 32];
      win_lo = stream[pos / 32 + 1];
      #1;
      exp = 0;
      for (int i = 0; i < int'(nbits); i++) exp = {exp[30:0], stream_bit(pos + i)};
      checks++;
      if (bits !== exp) begin
        failures++;
        $display("MISMATCH pos %0d n %0d: got %h exp %h", pos, nbits, bits, exp);
      end
      checks++;
      if (next_pos !== 32'(pos + int'(nbits))) begin
        failures++;
        $display("MISMATCH next_pos at %0d: got %0d", pos, next_pos);
      end
      pos = pos + int'(nbits);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
