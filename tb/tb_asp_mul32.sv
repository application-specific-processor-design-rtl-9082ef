// tb_asp_mul32: self-checking test of the MUL32 datapath. Drives corner and
// random operands, with junk in the unused upper halves, and compares the
// product with one computed from sign-extended integers.
module tb_asp_mul32;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic [31:0] ars, art, arr;
  asp_mul32 dut (.ars, .art, .arr);

  task automatic check(logic [15:0] a, logic [15:0] b);
    longint ea, eb, exp;
    ars = {16'($urandom), a};
    art = {16'($urandom), b};
    #1;
    ea  = longint'($signed(a));
    eb  = longint'($signed(b));
    exp = ea * eb;
    checks++;
    if (arr !== exp[31:0]) begin
      failures++;
      $display("MISMATCH %0d x %0d: got %h exp %h", ea, eb, arr, exp[31:0]);
    end
  endtask

  initial begin
    check(16'd0, 16'd0);
    check(16'h7fff, 16'h7fff);
    check(16'h8000, 16'h8000);
    check(16'h8000, 16'h7fff);
    check(16'hffff, 16'd3);
    check(16'd255, 16'd20);
    for (int i = 0; i < 500; i++) check(16'($urandom), 16'($urandom));
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
