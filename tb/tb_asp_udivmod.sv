// tb_asp_udivmod: self-checking test of the iterative unsigned divider.
// Issues corner and random divisions, checks quotient and remainder against
// the / and % operators and checks that done is set by the 32nd clock edge after
// the one that takes start. Divide by zero must give all ones and the dividend.
module tb_asp_udivmod;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic rst_n, start, busy, done;
  logic [31:0] dividend, divisor, quotient, remainder;
  asp_udivmod dut (.clk, .rst_n, .start, .dividend, .divisor, .busy, .done,
                   .quotient, .remainder);

  task automatic run(logic [31:0] a, logic [31:0] b);
    int cyc;
    logic [31:0] eq, er;
    @(negedge clk);
    dividend = a; divisor = b; start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    cyc = 0;
    while (!done) begin
      @(negedge clk);
      cyc++;
    end
    eq = (b == 0) ? 32'hffff_ffff : a / b;
    er = (b == 0) ? a : a % b;
    checks++;
    if (quotient !== eq || remainder !== er) begin
      failures++;
      $display("MISMATCH %0d / %0d: got q=%0d r=%0d", a, b, quotient, remainder);
    end
    checks++;
    if (cyc != 32) begin
      failures++;
      $display("LATENCY %0d cycles, expected 32", cyc);
    end
  endtask

  initial begin
    rst_n = 1'b0; start = 1'b0; dividend = 0; divisor = 0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    run(32'd100, 32'd7);
    run(32'hffff_ffff, 32'd1);
    run(32'hffff_ffff, 32'hffff_ffff);
    run(32'd5, 32'd9);
    run(32'd1234, 32'd0);
    run(32'h8000_0000, 32'd3);
    for (int i = 0; i < 200; i++) run($urandom, $urandom >> $urandom_range(0, 31));
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
