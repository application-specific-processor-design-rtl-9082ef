// tb_asp_muladd_coeff: self-checking test of the MULADD_COEFF datapath. Runs
// chains of accumulations as an interpolation loop would, feeding acc_out
// back to acc_in, and compares each lane with an integer model:
// hi += opnd[15:0]*C0, lo += opnd[47:32]*C1, each modulo 2^32.
module tb_asp_muladd_coeff;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic [63:0] acc_in, opnd, acc_out;
  logic [15:0] c0, c1;
  asp_muladd_coeff dut (.acc_in, .opnd, .c0, .c1, .acc_out);

  initial begin
    longint hi, lo;
    for (int chain = 0; chain < 50; chain++) begin
      hi = (chain == 0) ? 64'h7fff_fff0 : longint'($urandom);
      lo = longint'($urandom);
      acc_in = {hi[31:0], lo[31:0]};
      c0 = (chain == 0) ? 16'd8 : 16'($urandom);
      c1 = (chain == 0) ? 16'hfff8 : 16'($urandom);
      for (int k = 0; k < 8; k++) begin
        opnd = {$urandom, $urandom};
        if (chain == 1) opnd = 64'h0000_00ff_0000_00ff;
        #1;
        hi = hi + longint'($signed(opnd[15:0])) * longint'($signed(c0));
        lo = lo + longint'($signed(opnd[47:32])) * longint'($signed(c1));
        checks++;
        if (acc_out !== {hi[31:0], lo[31:0]}) begin
          failures++;
          $display("MISMATCH chain %0d step %0d: got %h exp %h", chain, k, acc_out,
                   {hi[31:0], lo[31:0]});
        end
        acc_in = acc_out;
      end
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
