// tb_asp_mc_chroma: workload test, eighth-pel bilinear chroma prediction of
// one CIF frame's two chroma planes (2 x 176x144 pixels, 792 8x8 blocks)
// with MULADD_COEFF and CLP8, the unit at its default parameters.
//
// The testbench plays the software: for each 8x8 block it draws a random
// fractional vector (dx, dy) in eighths; for each predicted pixel it seeds
// the accumulator, loads COEFF = {dx*(8-dy), (8-dx)*(8-dy)} and issues one
// MULADD_COEFF on the pair (A, B), loads COEFF = {dx*dy, (8-dx)*dy} and issues
// one on (C, D), reads both halves with RUR, adds them and the rounding 32
// as the base ALU would, shifts by 6 and clips with CLP8. Every clipped
// pixel is compared with the H.264 bilinear formula computed directly.
module tb_asp_mc_chroma;
  import asp_pkg::*;
  localparam int W = 176, H = 144, PLANES = 2;

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

  logic [7:0] ref_pic [H + 1][W + 1];

  // issue one instruction; return its general-register result (if any)
  task automatic exec(asp_op_e op, int imm, logic [31:0] a, logic [31:0] b,
                      output logic [31:0] res);
    in_valid = 1'b1; in_op = op; in_imm = 8'(imm); in_ars = a; in_art = b;
    @(posedge clk);
    while (!in_ready) @(posedge clk);
    #1;
    in_valid = 1'b0;
    while (!wb_valid) begin
      @(posedge clk);
      #1;
    end
    res = wb_data;
  endtask

  initial begin
    logic [31:0] r, hi, lo;
    int dx, dy, a, b, c, d, expv, nclip, npix;
    rst_n = 1'b0; in_valid = 1'b0; in_op = OP_NOP; in_imm = '0; in_ars = '0; in_art = '0;
    nclip = 0; npix = 0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    for (int p = 0; p < PLANES; p++) begin
      foreach (ref_pic[y, x]) ref_pic[y][x] = 8'($urandom);
      for (int by = 0; by < H; by += 8)
        for (int bx = 0; bx < W; bx += 8) begin
          dx = $urandom_range(0, 7);
          dy = $urandom_range(0, 7);
          for (int y = by; y < by + 8; y++)
            for (int x = bx; x < bx + 8; x++) begin
              a = ref_pic[y][x];     b = ref_pic[y][x + 1];
              c = ref_pic[y + 1][x]; d = ref_pic[y + 1][x + 1];
              exec(OP_WUR, UR_ACC_HI, 32'd0, 0, r);
              exec(OP_WUR, UR_ACC_LO, 32'd0, 0, r);
              exec(OP_WUR, UR_COEFF, {16'(dx * (8 - dy)), 16'((8 - dx) * (8 - dy))}, 0, r);
              exec(OP_MULADD, 0, 32'(b), 32'(a), r);
              exec(OP_WUR, UR_COEFF, {16'(dx * dy), 16'((8 - dx) * dy)}, 0, r);
              exec(OP_MULADD, 0, 32'(d), 32'(c), r);
              exec(OP_RUR, UR_ACC_HI, 0, 0, hi);
              exec(OP_RUR, UR_ACC_LO, 0, 0, lo);
              exec(OP_CLP8, 0, $signed(hi + lo + 32) >>> 6, 0, r);
              expv = ((8 - dx) * (8 - dy) * a + dx * (8 - dy) * b +
                      (8 - dx) * dy * c + dx * dy * d + 32) >>> 6;
              checks++;
              npix++;
              if (r !== 32'(expv)) begin
                failures++;
                if (failures < 10) $display("MISMATCH plane %0d (%0d,%0d): got %0d exp %0d",
                                            p, x, y, r, expv);
              end
              // residual add and clip, as reconstruction does
              exec(OP_CLP8, 0, 32'(expv + (x % 3 == 0 ? 200 : -200)), 0, r);
              checks++;
              if (r !== 32'((x % 3 == 0) ? ((expv + 200 > 255) ? 255 : expv + 200)
                                          : ((expv - 200 < 0) ? 0 : expv - 200))) begin
                failures++;
                if (failures < 10) $display("MISMATCH reconstruct clip at (%0d,%0d)", x, y);
              end
              if (expv + 200 > 255 || expv - 200 < 0) nclip++;
            end
        end
    end
    checks++;
    if (npix != PLANES * W * H || nclip == 0) begin
      failures++;
      $display("ERROR: %0d pixels, %0d clipped", npix, nclip);
    end
    $display("chroma prediction: %0d pixels, %0d reconstructions clipped", npix, nclip);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (PLANES * W * H * 10 * 4 + 1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
