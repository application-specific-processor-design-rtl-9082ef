// Shared body of the end-to-end testbenches of asp_tie_unit. The including
// module declares localparam bit IH (whether the unit under test has the
// iH_LUMADC/iH_CHROMADC datapaths) and localparam int N_RANDOM, and
// instantiates the unit as "dut" on the signals declared here.
//
// Stimulus: a directed program (a residual block through iTRANS, an
// interpolation through MULADD_COEFF and CLP8, a stream walk through
// SHOWBITS/FLUSHBITS, divisions) followed by N_RANDOM random instructions
// with random bubbles. A reference model of the special registers, written
// with expanded formulas independent of the RTL, computes each expected
// result when the instruction is generated. Results are checked in order at
// write back, together with the latency (2 edges, 34 for division). Each
// mechanism (every opcode, the divide stall, divide by zero, both CLP8
// saturations, a SHOWBITS window crossing, an unconfigured opcode) is
// counted, and one that never happened counts as a failure.

  logic clk = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  int cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  logic        rst_n;
  logic        in_valid, in_ready;
  asp_op_e     in_op;
  logic [7:0]  in_imm;
  logic [31:0] in_ars, in_art;
  logic        wb_valid, wb_we, wb_illegal;
  logic [31:0] wb_data;

  typedef struct {
    asp_op_e     op;
    logic [7:0]  imm;
    logic [31:0] ars, art;
  } instr_t;

  typedef struct {
    asp_op_e     op;
    logic        we, illegal;
    logic [31:0] data;
    int          acc_cyc;
  } expect_t;

  // ---------------------------------------------------------- reference model
  int          m_blk [16];        // coefficient index = row*4 + col
  logic [31:0] m_acc_hi, m_acc_lo, m_coeff, m_bitpos;
  logic [31:0] stream [64];

  int n_op [16];
  int n_stall, n_div0, n_sat_hi, n_sat_lo, n_cross, n_illegal;

  function automatic int s16(logic [15:0] v);
    return int'($signed(v));
  endfunction

  function automatic void itrans1d(input int x[4], output int y[4]);
    y[0] = x[0] + x[1] + x[2] + (x[3] >>> 1);
    y[1] = x[0] + (x[1] >>> 1) - x[2] - x[3];
    y[2] = x[0] - (x[1] >>> 1) - x[2] + x[3];
    y[3] = x[0] - x[1] + x[2] - (x[3] >>> 1);
  endfunction

  function automatic void had1d(input int x[4], output int y[4]);
    y[0] = x[0] + x[1] + x[2] + x[3];
    y[1] = x[0] + x[1] - x[2] - x[3];
    y[2] = x[0] - x[1] - x[2] + x[3];
    y[3] = x[0] - x[1] + x[2] - x[3];
  endfunction

  // 2-D transform of m_blk: rows then columns; kind 0 = iTRANS, 1 = Hadamard
  function automatic void model_2d(int kind);
    int t[16], v[4], w[4];
    for (int r = 0; r < 4; r++) begin
      for (int c = 0; c < 4; c++) v[c] = m_blk[r * 4 + c];
      if (kind == 0) itrans1d(v, w); else had1d(v, w);
      for (int c = 0; c < 4; c++) t[r * 4 + c] = w[c];
    end
    for (int c = 0; c < 4; c++) begin
      for (int r = 0; r < 4; r++) v[r] = t[r * 4 + c];
      if (kind == 0) itrans1d(v, w); else had1d(v, w);
      for (int r = 0; r < 4; r++)
        m_blk[r * 4 + c] = s16(16'(kind == 0 ? (w[r] + 32) >>> 6 : w[r]));
    end
  endfunction

  function automatic logic [31:0] model_rur(logic [7:0] idx);
    if (idx < 8) return {16'(m_blk[2 * idx + 1]), 16'(m_blk[2 * idx])};
    case (idx)
      8'd8:  return m_acc_lo;
      8'd9:  return m_acc_hi;
      8'd10: return m_coeff;
      8'd11: return m_bitpos;
      default: return 32'd0;
    endcase
  endfunction

  function automatic expect_t model_exec(instr_t i);
    expect_t e;
    longint p;
    int n, c0, c1, c2, c3, sv;
    e.op = i.op; e.we = 1'b0; e.illegal = 1'b0; e.data = 32'd0; e.acc_cyc = 0;
    n_op[i.op]++;
    case (i.op)
      OP_MUL32: begin
        p = longint'(s16(i.ars[15:0])) * longint'(s16(i.art[15:0]));
        e.we = 1'b1; e.data = p[31:0];
      end
      OP_CLP8: begin
        sv = int'($signed(i.ars));
        if (sv < 0) n_sat_lo++;
        if (sv > 255) n_sat_hi++;
        e.we = 1'b1; e.data = (sv < 0) ? 0 : (sv > 255 ? 255 : sv);
      end
      OP_MULADD: begin
        m_acc_hi = m_acc_hi + 32'(s16(i.art[15:0]) * s16(m_coeff[15:0]));
        m_acc_lo = m_acc_lo + 32'(s16(i.ars[15:0]) * s16(m_coeff[31:16]));
      end
      OP_SHOWBITS, OP_FLUSHBITS: begin
        n = int'(i.imm[5:0]);
        if (n > 32) n = 32;
        e.we = 1'b1;
        if (i.op == OP_SHOWBITS) begin
          if (int'(m_bitpos[4:0]) + n > 32) n_cross++;
          for (int k = 0; k < n; k++) begin
            int b;
            b = int'(m_bitpos[4:0]) + k;
            e.data = {e.data[30:0], (b < 32) ? i.ars[31 - b] : i.art[63 - b]};
          end
        end else begin
          m_bitpos = m_bitpos + 32'(n);
          e.data = m_bitpos;
        end
      end
      OP_UDIV, OP_UMOD: begin
        e.we = 1'b1;
        if (i.art == 0) begin
          n_div0++;
          e.data = (i.op == OP_UDIV) ? 32'hffff_ffff : i.ars;
        end else e.data = (i.op == OP_UDIV) ? i.ars / i.art : i.ars % i.art;
      end
      OP_ITRANS: model_2d(0);
      OP_IH_LUMADC: if (IH) model_2d(1); else e.illegal = 1'b1;
      OP_IH_CHROMADC: if (IH) begin
        c0 = m_blk[0]; c1 = m_blk[1]; c2 = m_blk[2]; c3 = m_blk[3];
        m_blk[0] = s16(16'(c0 + c1 + c2 + c3));
        m_blk[1] = s16(16'(c0 - c1 + c2 - c3));
        m_blk[2] = s16(16'(c0 + c1 - c2 - c3));
        m_blk[3] = s16(16'(c0 - c1 - c2 + c3));
      end else e.illegal = 1'b1;
      OP_RUR: begin e.we = 1'b1; e.data = model_rur(i.imm); end
      OP_WUR: begin
        if (i.imm < 8) begin
          m_blk[2 * i.imm]     = s16(i.ars[15:0]);
          m_blk[2 * i.imm + 1] = s16(i.ars[31:16]);
        end else if (i.imm == 8)  m_acc_lo = i.ars;
        else if (i.imm == 9)  m_acc_hi = i.ars;
        else if (i.imm == 10) m_coeff  = i.ars;
        else if (i.imm == 11) m_bitpos = i.ars;
      end
      default: ;
    endcase
    if (e.illegal) n_illegal++;
    return e;
  endfunction

  // ---------------------------------------------------------------- program
  instr_t prog [$];

  function automatic instr_t mk(asp_op_e op, int imm, logic [31:0] a, logic [31:0] b);
    instr_t i;
    i.op = op; i.imm = 8'(imm); i.ars = a; i.art = b;
    return i;
  endfunction

  task automatic build_program();
    instr_t i;
    int r;
    // residual block: load, iTRANS, read back
    for (int k = 0; k < 8; k++) prog.push_back(mk(OP_WUR, k, {16'(k * 5 - 20), 16'(64 - k * 9)}, 0));
    if (IH) begin
      prog.push_back(mk(OP_IH_LUMADC, 0, 0, 0));
      prog.push_back(mk(OP_IH_CHROMADC, 0, 0, 0));
    end
    prog.push_back(mk(OP_ITRANS, 0, 0, 0));
    for (int k = 0; k < 8; k++) prog.push_back(mk(OP_RUR, k, 0, 0));
    // chroma-style interpolation: C0 = 6, C1 = 2, four taps, clip
    prog.push_back(mk(OP_WUR, 10, {16'd2, 16'd6}, 0));
    prog.push_back(mk(OP_WUR, 8, 32'd32, 0));
    prog.push_back(mk(OP_WUR, 9, 32'd32, 0));
    for (int k = 0; k < 4; k++) prog.push_back(mk(OP_MULADD, 0, 32'(40 * k + 3), 32'(250 - 7 * k)));
    prog.push_back(mk(OP_RUR, 8, 0, 0));
    prog.push_back(mk(OP_RUR, 9, 0, 0));
    prog.push_back(mk(OP_CLP8, 0, 32'd300, 0));
    prog.push_back(mk(OP_CLP8, 0, -32'sd7, 0));
    prog.push_back(mk(OP_MUL32, 0, 32'hffff_fffd, 32'd1000));
    // bit-stream walk over the first words of the stream
    prog.push_back(mk(OP_WUR, 11, 32'd0, 0));
    for (int k = 0; k < 12; k++) begin
      prog.push_back(mk(OP_SHOWBITS, 13 + k, 32'h0, 32'h0)); // window filled at issue
      prog.push_back(mk(OP_FLUSHBITS, 13 + k, 0, 0));
    end
    // divisions back to back with other work (stall), and divide by zero
    prog.push_back(mk(OP_UDIV, 0, 32'd396, 32'd22));
    prog.push_back(mk(OP_UMOD, 0, 32'd396, 32'd22));
    prog.push_back(mk(OP_MUL32, 0, 32'd7, 32'd9));
    prog.push_back(mk(OP_UDIV, 0, 32'd5, 32'd0));
    prog.push_back(mk(OP_UMOD, 0, 32'd5, 32'd0));
    prog.push_back(mk(OP_NOP, 0, 0, 0));
    // random instructions
    for (int k = 0; k < N_RANDOM; k++) begin
      r = $urandom_range(0, 99);
      i.imm = 8'($urandom_range(0, 12));
      i.ars = $urandom;
      i.art = $urandom;
      if (r < 10) i.op = OP_MUL32;
      else if (r < 20) begin i.op = OP_CLP8; i.ars = 32'($urandom_range(0, 1023)) - 32'd256; end
      else if (r < 30) i.op = OP_MULADD;
      else if (r < 40) begin i.op = OP_SHOWBITS; i.imm = 8'($urandom_range(0, 40)); end
      else if (r < 45) begin i.op = OP_FLUSHBITS; i.imm = 8'($urandom_range(0, 40)); end
      else if (r < 48) begin i.op = OP_UDIV; i.art = i.art >> $urandom_range(0, 31); end
      else if (r < 50) begin i.op = OP_UMOD; i.art = i.art >> $urandom_range(0, 31); end
      else if (r < 56) i.op = OP_ITRANS;
      else if (r < 59) i.op = OP_IH_LUMADC;
      else if (r < 62) i.op = OP_IH_CHROMADC;
      else if (r < 76) i.op = OP_RUR;
      else if (r < 96) begin
        i.op = OP_WUR;
        // keep coefficients and the bit position in a useful range
        if (i.imm < 8) i.ars = {16'($urandom_range(0, 4095) - 2048), 16'($urandom_range(0, 4095) - 2048)};
        if (i.imm == 11) i.ars = 32'($urandom_range(0, 1023));
      end
      else i.op = OP_NOP;
      prog.push_back(i);
    end
  endtask

  // ------------------------------------------------------- driver / monitor
  expect_t exq [$];
  expect_t pend;
  logic    offered = 1'b0, acc_next = 1'b0;
  int      retired = 0;

  task automatic offer(instr_t i);
    // SHOWBITS reads the two stream words around the current position
    if (i.op == OP_SHOWBITS) begin
      i.ars = stream[(m_bitpos >> 5) % 63];
      i.art = stream[(m_bitpos >> 5) % 63 + 1];
    end
    pend     = model_exec(i);
    in_valid = 1'b1;
    in_op    = i.op;
    in_imm   = i.imm;
    in_ars   = i.ars;
    in_art   = i.art;
    offered  = 1'b1;
  endtask

  initial begin
    expect_t e;
    int lat;
    foreach (stream[k]) stream[k] = $urandom;
    foreach (m_blk[k]) m_blk[k] = 0;
    m_acc_hi = 0; m_acc_lo = 0; m_coeff = 0; m_bitpos = 0;
    foreach (n_op[k]) n_op[k] = 0;
    n_stall = 0; n_illegal = 0; n_div0 = 0; n_sat_hi = 0; n_sat_lo = 0; n_cross = 0;
    build_program();
    rst_n = 1'b0; in_valid = 1'b0; in_op = OP_NOP; in_imm = '0; in_ars = '0; in_art = '0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    while (prog.size() > 0 || offered || exq.size() > 0) begin
      @(negedge clk);
      if (wb_valid) begin
        checks++;
        if (exq.size() == 0) begin
          failures++;
          $display("ERROR: write back with nothing outstanding");
        end else begin
          e = exq.pop_front();
          lat = cyc - e.acc_cyc;
          retired++;
          if (wb_we !== e.we || wb_illegal !== e.illegal || (e.we && wb_data !== e.data)) begin
            failures++;
            $display("MISMATCH %s: we=%0b ill=%0b data=%h, expected we=%0b ill=%0b data=%h",
                     e.op.name(), wb_we, wb_illegal, wb_data, e.we, e.illegal, e.data);
          end
          checks++;
          if (lat != ((e.op == OP_UDIV || e.op == OP_UMOD) ? 34 : 2)) begin
            failures++;
            $display("LATENCY %s: %0d edges", e.op.name(), lat);
          end
        end
      end
      if (offered && acc_next) begin
        pend.acc_cyc = cyc;
        exq.push_back(pend);
        offered  = 1'b0;
        in_valid = 1'b0;
      end
      if (!offered && prog.size() > 0 && $urandom_range(0, 9) != 0) offer(prog.pop_front());
      #1;
      acc_next = in_valid && in_ready;
      if (in_valid && !in_ready) n_stall++;
    end
    repeat (4) @(negedge clk);
    checks++;
    if (wb_valid) begin
      failures++;
      $display("ERROR: extra write back");
    end
    // every mechanism must have happened
    for (int k = 1; k <= 12; k++) begin
      checks++;
      if (n_op[k] == 0) begin
        failures++;
        $display("NOT EXERCISED: opcode %s", asp_op_e'(k));
      end
    end
    checks++; if (n_stall == 0)  begin failures++; $display("NOT EXERCISED: divide stall"); end
    checks++; if (n_div0 == 0)   begin failures++; $display("NOT EXERCISED: divide by zero"); end
    checks++; if (n_sat_hi == 0) begin failures++; $display("NOT EXERCISED: CLP8 high"); end
    checks++; if (n_sat_lo == 0) begin failures++; $display("NOT EXERCISED: CLP8 low"); end
    checks++; if (!IH && n_illegal == 0) begin failures++; $display("NOT EXERCISED: unconfigured opcode"); end
    checks++; if (n_cross == 0)  begin failures++; $display("NOT EXERCISED: window crossing"); end
    $display("retired %0d instructions in %0d cycles; stall cycles %0d, divide by zero %0d, clip high %0d low %0d, window crossings %0d, unconfigured %0d",
             retired, cyc, n_stall, n_div0, n_sat_hi, n_sat_lo, n_cross, n_illegal);
    for (int k = 1; k <= 12; k++) $display("  %-15s %0d", asp_op_e'(k), n_op[k]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200 * (N_RANDOM + 200)) @(posedge clk);
    failures++;
    $display("WATCHDOG");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
