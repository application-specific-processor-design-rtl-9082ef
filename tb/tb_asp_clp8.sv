// tb_asp_clp8: self-checking test of the CLP8 clip. Sweeps the values around
// 0 and 255, the extremes and random 32-bit values, comparing with a
// reference clip on signed integers.
module tb_asp_clp8;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic [31:0] ars, arr;
  asp_clp8 dut (.ars, .arr);

  task automatic check(int v);
    int exp;
    ars = v;
    #1;
    exp = (v < 0) ? 0 : (v > 255 ? 255 : v);
    checks++;
    if (arr !== 32'(exp)) begin
      failures++;
      $display("MISMATCH clp8(%0d): got %0d exp %0d", v, arr, exp);
    end
  endtask

  initial begin
    for (int v = -300; v <= 600; v++) check(v);
    check(32'h7fffffff);
    check(32'h80000000);
    check(32'h00010000);
    check(32'h00000100);
    for (int i = 0; i < 500; i++) check($urandom);
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
