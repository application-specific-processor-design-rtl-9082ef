// tb_asp_ih_chromadc: self-checking test of the 2x2 inverse Hadamard.
// Reference: f = H * C * H with H = [1 1; 1 -1] on the 2x2 matrix
// [dc[0] dc[1]; dc[2] dc[3]], computed as matrix products on integers.
module tb_asp_ih_chromadc;
  import asp_pkg::*;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  coef_t [3:0] dc_in, dc_out;
  asp_ih_chromadc dut (.dc_in, .dc_out);

  localparam int H[2][2] = '{'{1, 1}, '{1, -1}};

  task automatic check_block();
    int c[2][2], t[2][2], f;
    logic [15:0] exp;
    #1;
    for (int k = 0; k < 4; k++) c[k / 2][k % 2] = int'($signed(dc_in[k]));
    for (int i = 0; i < 2; i++) for (int j = 0; j < 2; j++)
      t[i][j] = H[i][0] * c[0][j] + H[i][1] * c[1][j];
    for (int i = 0; i < 2; i++) for (int j = 0; j < 2; j++) begin
      f = t[i][0] * H[0][j] + t[i][1] * H[1][j];
      exp = f[15:0];
      checks++;
      if (dc_out[i * 2 + j] !== exp) begin
        failures++;
        $display("MISMATCH f%0d%0d: got %0d exp %0d", i, j, $signed(dc_out[i * 2 + j]), f);
      end
    end
  endtask

  initial begin
    for (int k = 0; k < 4; k++) begin
      dc_in = '0; dc_in[k] = 16'sd5;
      check_block();
    end
    for (int i = 0; i < 300; i++) begin
      foreach (dc_in[k]) dc_in[k] = 16'($urandom);
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
