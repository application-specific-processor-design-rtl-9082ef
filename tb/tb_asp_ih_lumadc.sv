// tb_asp_ih_lumadc: self-checking test of the 4x4 inverse Hadamard. The
// reference is the matrix product H * C * H with
// H = [1 1 1 1; 1 1 -1 -1; 1 -1 -1 1; 1 -1 1 -1], on integers, truncated to
// 16 bits.
module tb_asp_ih_lumadc;
  import asp_pkg::*;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  blk_t blk_in, blk_out;
  asp_ih_lumadc dut (.blk_in, .blk_out);

  localparam int H[4][4] = '{'{1, 1, 1, 1}, '{1, 1, -1, -1}, '{1, -1, -1, 1}, '{1, -1, 1, -1}};

  task automatic check_block();
    int t[4][4], f;
    logic [15:0] exp;
    #1;
    for (int i = 0; i < 4; i++) for (int j = 0; j < 4; j++) begin
      t[i][j] = 0;
      for (int k = 0; k < 4; k++) t[i][j] += H[i][k] * int'($signed(blk_in[k][j]));
    end
    for (int i = 0; i < 4; i++) for (int j = 0; j < 4; j++) begin
      f = 0;
      for (int k = 0; k < 4; k++) f += t[i][k] * H[k][j];
      exp = f[15:0];
      checks++;
      if (blk_out[i][j] !== exp) begin
        failures++;
        $display("MISMATCH [%0d][%0d]: got %0d exp %0d", i, j, $signed(blk_out[i][j]), f);
      end
    end
  endtask

  initial begin
    for (int k = 0; k < 16; k++) begin
      blk_in = '0; blk_in[k / 4][k % 4] = 16'sd3;
      check_block();
    end
    for (int i = 0; i < 200; i++) begin
      foreach (blk_in[r, c]) blk_in[r][c] = 16'($urandom_range(0, 2047)) - 16'd1024;
      check_block();
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
