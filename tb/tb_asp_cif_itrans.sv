// tb_asp_cif_itrans: workload test, the inverse-transform share of decoding
// one CIF frame (352x288: 396 macroblocks x 24 4x4 blocks = 9504 blocks) on
// the extension unit at its default parameters.
//
// For every block the software sequence is issued back to back: eight WUR
// loads of the coefficient register, one iTRANS and eight RUR reads. The
// coefficients are random, of the size dequantised residuals have. Every
// read-back word is compared with a reference transform (expanded formulas,
// rows then columns, (y + 32) >> 6), and the clock count of the whole frame
// must equal one instruction per clock plus the two-edge pipeline drain.
module tb_asp_cif_itrans;
  import asp_pkg::*;
  localparam int MB_PER_FRAME = 396;
  localparam int BLK_PER_MB   = 24;
  localparam int N_BLK        = MB_PER_FRAME * BLK_PER_MB;
  localparam int INSTR_PER_BLK = 17;

  logic clk = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic        rst_n, in_valid, in_ready, wb_valid, wb_we, wb_illegal;
  asp_op_e     in_op;
  logic [7:0]  in_imm;
  logic [31:0] in_ars, in_art, wb_data;

  asp_tie_unit dut (
    .clk, .rst_n, .in_valid, .in_ready, .in_op, .in_imm, .in_ars, .in_art,
    .wb_valid, .wb_we, .wb_illegal, .wb_data
  );

  logic [31:0] expq [$];
  int n_reads = 0;

  function automatic void ref1d(input int x[4], output int y[4]);
    y[0] = x[0] + x[1] + x[2] + (x[3] >>> 1);
    y[1] = x[0] + (x[1] >>> 1) - x[2] - x[3];
    y[2] = x[0] - (x[1] >>> 1) - x[2] + x[3];
    y[3] = x[0] - x[1] + x[2] - (x[3] >>> 1);
  endfunction

  // compare every general-register write back with the expected words
  always @(posedge clk) begin
    if (rst_n && wb_valid && wb_we) begin
      checks++;
      n_reads++;
      if (expq.size() == 0 || wb_data !== expq[0]) begin
        failures++;
        if (failures < 10) $display("MISMATCH read %0d: got %h", n_reads, wb_data);
      end
      if (expq.size() > 0) void'(expq.pop_front());
    end
  end

  task automatic issue(asp_op_e op, int imm, logic [31:0] a);
    in_valid = 1'b1; in_op = op; in_imm = 8'(imm); in_ars = a; in_art = '0;
    @(posedge clk);
    while (!in_ready) @(posedge clk);
    #1;
  endtask

  initial begin
    int m[4][4], t[4][4], v[4], w[4];
    longint t0, t1;
    rst_n = 1'b0; in_valid = 1'b0; in_op = OP_NOP; in_imm = '0; in_ars = '0; in_art = '0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    t0 = longint'($time / 10);
    for (int b = 0; b < N_BLK; b++) begin
      foreach (m[r, c]) m[r][c] = $urandom_range(0, 1023) - 512;
      for (int k = 0; k < 8; k++)
        issue(OP_WUR, k, {16'(m[k / 2][(k % 2) * 2 + 1]), 16'(m[k / 2][(k % 2) * 2])});
      issue(OP_ITRANS, 0, '0);
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
      for (int k = 0; k < 8; k++) begin
        expq.push_back({16'(m[k / 2][(k % 2) * 2 + 1]), 16'(m[k / 2][(k % 2) * 2])});
        issue(OP_RUR, k, '0);
      end
    end
    in_valid = 1'b0;
    repeat (2) @(posedge clk);
    #1;
    t1 = longint'($time / 10);
    @(posedge clk);
    #1;
    checks++;
    if (n_reads != 8 * N_BLK || expq.size() != 0) begin
      failures++;
      $display("ERROR: %0d reads, %0d outstanding", n_reads, expq.size());
    end
    checks++;
    if (t1 - t0 != longint'(N_BLK * INSTR_PER_BLK + 2)) begin
      failures++;
      $display("ERROR: frame took %0d clocks, expected %0d", t1 - t0, N_BLK * INSTR_PER_BLK + 2);
    end
    $display("CIF frame: %0d blocks, %0d clocks for the inverse transforms", N_BLK, t1 - t0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (N_BLK * INSTR_PER_BLK * 2 + 1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
