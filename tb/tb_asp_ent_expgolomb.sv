// tb_asp_ent_expgolomb: workload test of the entropy-decoding instructions
// at default parameters: parsing a stream of unsigned Exp-Golomb codes (the
// ue(v) syntax elements of an H.264 slice) with SHOWBITS and FLUSHBITS, and
// turning macroblock addresses into CIF macroblock coordinates with UMOD and
// UDIV (22 macroblocks per row), the work of the decoder's bit-reading and
// macroblock-initialisation routines.
//
// The testbench encodes random values (codeNum) into a word array, then
// plays the software: it fetches the two stream words at the current
// position, SHOWBITS 32 to find the leading zeros (counted here, as the
// base core's count-leading-zeros would), FLUSHBITS over them, SHOWBITS
// lz+1 to read the info field, FLUSHBITS again; the value is that field
// minus one. Each value is used as a skip run that advances the macroblock
// address; UMOD/UDIV by 22 must give its column and row. The final bit
// position must equal the encoded length.
module tb_asp_ent_expgolomb;
  import asp_pkg::*;
  localparam int N_VALUES = 1500;
  localparam int N_WORDS  = 2048;
  localparam int MB_W     = 22;     // CIF width in macroblocks

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

  logic [31:0] stream [N_WORDS];
  int          values [N_VALUES];
  int          nbits_total;

  task automatic put_bit(logic b);
    stream[nbits_total / 32][31 - nbits_total % 32] = b;
    nbits_total++;
  endtask

  task automatic put_ue(int v);
    int len;
    logic [31:0] code;
    code = 32'(v + 1);
    len = $clog2(v + 2);            // bits of v+1
    for (int k = 0; k < len - 1; k++) put_bit(1'b0);
    for (int k = len - 1; k >= 0; k--) put_bit(code[k]);
  endtask

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
    logic [31:0] w, pos, code, q, rem;
    int lz, v, addr, ndiv;
    rst_n = 1'b0; in_valid = 1'b0; in_op = OP_NOP; in_imm = '0; in_ars = '0; in_art = '0;
    foreach (stream[k]) stream[k] = '0;
    nbits_total = 0;
    foreach (values[k]) begin
      // mostly short codes, some long ones up to 16 zeros
      values[k] = ($urandom_range(0, 3) == 0) ? $urandom_range(0, 65000) : $urandom_range(0, 20);
      put_ue(values[k]);
    end
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    exec(OP_WUR, UR_BITPOS, 32'd0, 0, pos);
    pos = 0;
    addr = 0;
    ndiv = 0;
    for (int k = 0; k < N_VALUES; k++) begin
      exec(OP_SHOWBITS, 32, stream[pos >> 5], stream[(pos >> 5) + 1], w);
      lz = 0;
      while (lz < 32 && !w[31 - lz]) lz++;
      exec(OP_FLUSHBITS, lz, 0, 0, pos);
      exec(OP_SHOWBITS, lz + 1, stream[pos >> 5], stream[(pos >> 5) + 1], code);
      exec(OP_FLUSHBITS, lz + 1, 0, 0, pos);
      v = int'(code) - 1;
      checks++;
      if (v != values[k]) begin
        failures++;
        if (failures < 10) $display("MISMATCH value %0d: got %0d exp %0d", k, v, values[k]);
      end
      addr = (addr + v) % (MB_W * 18 * 40);
      exec(OP_UMOD, 0, 32'(addr), 32'(MB_W), rem);
      exec(OP_UDIV, 0, 32'(addr), 32'(MB_W), q);
      ndiv += 2;
      checks++;
      if (rem != 32'(addr % MB_W) || q != 32'(addr / MB_W)) begin
        failures++;
        if (failures < 10) $display("MISMATCH mb %0d: got (%0d,%0d)", addr, rem, q);
      end
    end
    checks++;
    if (pos != 32'(nbits_total)) begin
      failures++;
      $display("ERROR: final bit position %0d, stream length %0d", pos, nbits_total);
    end
    $display("parsed %0d codes, %0d bits, %0d divisions", N_VALUES, nbits_total, ndiv);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (N_VALUES * 120 + 1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
