// tb_asp_itrans: self-checking test of the iTRANS datapath. The reference is
// written as the expanded 1-D formulas (no butterfly), e.g.
// y1 = x0 + (x1 >> 1) - x2 - x3, on integers, rows then columns, followed by
// (y + 32) >> 6 and truncation to 16 bits. Uses a DC-only block, single
// coefficients, the full 16-bit range and random blocks of typical size.
module tb_asp_itrans;
  import asp_pkg::*;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  blk_t blk_in, blk_out;
  asp_itrans dut (.blk_in, .blk_out);

  function automatic void ref1d(input int x[4], output int y[4]);
    y[0] = x[0] + x[1] + x[2] + (x[3] >>> 1);
    y[1] = x[0] + (x[1] >>> 1) - x[2] - x[3];
    y[2] = x[0] - (x[1] >>> 1) - x[2] + x[3];
    y[3] = x[0] - x[1] + x[2] - (x[3] >>> 1);
  endfunction

  task automatic check_block(string tag);
    int m[4][4], t[4][4], v[4], w[4];
    logic [15:0] exp;
    #1;
    for (int r = 0; r < 4; r++) for (int c = 0; c < 4; c++) m[r][c] = int'($signed(blk_in[r][c]));
    for (int r = 0; r < 4; r++) begin
      for (int c = 0; c < 4; c++) v[c] = m[r][c];
      ref1d(v, w);
      for (int c = 0; c < 4; c++) t[r][c] = w[c];
    end
    for (int c = 0; c < 4; c++) begin
      for (int r = 0; r < 4; r++) v[r] = t[r][c];
      ref1d(v, w);
      for (int r = 0; r < 4; r++) m[r][c] = (w[r] + 32) >>> 6;
    end
    for (int r = 0; r < 4; r++) for (int c = 0; c < 4; c++) begin
      exp = m[r][c][15:0];
      checks++;
      if (blk_out[r][c] !== exp) begin
        failures++;
        $display("MISMATCH %s [%0d][%0d]: got %0d exp %0d", tag, r, c,
                 $signed(blk_out[r][c]), $signed(exp));
      end
    end
  endtask

  initial begin
    blk_in = '0; blk_in[0][0] = 16'sd640;
    check_block("dc");
    for (int k = 0; k < 16; k++) begin
      blk_in = '0; blk_in[k / 4][k % 4] = -16'sd1000 + 16'(k * 37);
      check_block("single");
    end
    for (int i = 0; i < 20; i++) begin
      foreach (blk_in[r, c]) blk_in[r][c] = 16'($urandom);
      check_block("full-range");
    end
    for (int i = 0; i < 200; i++) begin
      foreach (blk_in[r, c]) blk_in[r][c] = 16'($urandom_range(0, 4095)) - 16'd2048;
      check_block("random");
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
