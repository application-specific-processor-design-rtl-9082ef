// asp_tie_unit: the H.264 instruction-extension unit of the application
// specific processor (the configuration with the motion-compensation,
// entropy-decoding, iTRANS and MUL32 instructions).
//
// It is the designer-defined execution unit that sits beside the base ALU of
// a five-stage RISC core (fetch I, decode/register-read R, execute E, memory
// M, write back W). The core decodes a custom instruction in R and hands it
// over with its two general-register operands (ars, art) and an immediate.
// The unit then:
//   E  executes it: MUL32 and CLP8 (asp_mul32, asp_clp8), MULADD_COEFF on the
//      64-bit accumulator special register (asp_muladd_coeff), SHOWBITS and
//      FLUSHBITS against the BITPOS special register (asp_showbits), UDIV/UMOD
//      (asp_udivmod, iterative), iTRANS and, when HAS_IH_DC = 1, iH_LUMADC
//      and iH_CHROMADC on the 4x4 block special register, and the RUR/WUR
//      moves between general and special registers. Special registers are
//      updated here, in program order, so one instruction sees the state left
//      by the one before with no bypass.
//   M  holds the result for one cycle (the coprocessor ALU of the pipeline
//      figure spans E and M).
//   W  presents the result: wb_valid for every retired instruction and wb_we
//      when it writes a general register (arr = wb_data).
// Handshake: the core offers an instruction with in_valid; it is taken on a
// clock edge where in_ready is high. in_ready falls while a UDIV/UMOD is
// iterating in E (32 cycles), which is the pipeline stall; the offered
// instruction must then be held unchanged. wb_valid is set by the second
// clock edge after the edge that accepts an instruction (E->M, M->W), and
// by the 34th for UDIV/UMOD (32 divider steps before E can hand over). An opcode that the configuration lacks retires with wb_illegal.
// The instruction list and the stage names follow the design; the encodings,
// the special-register map (asp_pkg) and the handshake are this
// implementation's own. HAS_IH_DC defaults to 0 because the final processor
// lists only iTRANS among the transform instructions.
// Reset: active low, asynchronous; all special registers clear to 0.
module asp_tie_unit
  import asp_pkg::*;
#(
  parameter bit HAS_IH_DC = 1'b0
) (
  input  logic        clk,
  input  logic        rst_n,
  // instruction from the core's R stage
  input  logic        in_valid,
  output logic        in_ready,
  input  asp_op_e     in_op,
  input  logic [7:0]  in_imm,
  input  logic [31:0] in_ars,
  input  logic [31:0] in_art,
  // write back (W stage)
  output logic        wb_valid,
  output logic        wb_we,
  output logic        wb_illegal,
  output logic [31:0] wb_data
);
  // ---------------------------------------------------------------- E stage
  logic        e_valid;
  asp_op_e     e_op;
  logic [7:0]  e_imm;
  logic [31:0] e_ars, e_art;

  // special registers
  blk_t        blk_q;
  logic [63:0] acc_q;
  logic [31:0] coeff_q;
  logic [31:0] bitpos_q;

  logic accept, e_is_div, e_go;
  logic div_busy, div_done;
  logic [31:0] div_q, div_r;

  function automatic logic is_div(asp_op_e op);
    return op == OP_UDIV || op == OP_UMOD;
  endfunction

  assign e_is_div = is_div(e_op);
  assign e_go     = e_valid && (!e_is_div || div_done);
  assign in_ready = !e_valid || e_go;
  assign accept   = in_valid && in_ready;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      e_valid <= 1'b0;
      e_op    <= OP_NOP;
      e_imm   <= '0;
      e_ars   <= '0;
      e_art   <= '0;
    end else if (in_ready) begin
      e_valid <= in_valid;
      if (in_valid) begin
        e_op  <= in_op;
        e_imm <= in_imm;
        e_ars <= in_ars;
        e_art <= in_art;
      end
    end
  end

  asp_udivmod #(.WIDTH(32)) u_div (
    .clk, .rst_n,
    .start    (accept && is_div(in_op)),
    .dividend (in_ars),
    .divisor  (in_art),
    .busy     (div_busy),
    .done     (div_done),
    .quotient (div_q),
    .remainder(div_r)
  );

  // execution units
  logic [31:0] mul_res, clp_res, sb_bits, sb_next;
  logic [63:0] acc_next;
  blk_t        blk_itrans, blk_ihl, blk_ihc;

  asp_mul32 u_mul (.ars(e_ars), .art(e_art), .arr(mul_res));
  asp_clp8  u_clp (.ars(e_ars), .arr(clp_res));
  asp_muladd_coeff u_mac (
    .acc_in (acc_q),
    .opnd   ({e_ars, e_art}),
    .c0     (coeff_q[15:0]),
    .c1     (coeff_q[31:16]),
    .acc_out(acc_next)
  );
  asp_showbits u_sb (
    .win_hi  (e_ars),
    .win_lo  (e_art),
    .bitpos  (bitpos_q),
    .nbits   (e_imm[5:0]),
    .bits    (sb_bits),
    .next_pos(sb_next)
  );
  asp_itrans u_itrans (.blk_in(blk_q), .blk_out(blk_itrans));

  coef_t [3:0] ihc_row;

  generate
    if (HAS_IH_DC) begin : g_ih
      asp_ih_lumadc   u_ihl (.blk_in(blk_q), .blk_out(blk_ihl));
      always_comb begin
        blk_ihc = blk_q;
        blk_ihc[0] = ihc_row;
      end
      asp_ih_chromadc u_ihc (.dc_in(blk_q[0]), .dc_out(ihc_row));
    end else begin : g_no_ih
      assign blk_ihl = blk_q;
      assign blk_ihc = blk_q;
      assign ihc_row = blk_q[0];
    end
  endgenerate

  // user-register read
  function automatic logic [31:0] ur_read(logic [7:0] idx, blk_t b, logic [63:0] a,
                                          logic [31:0] cf, logic [31:0] bp);
    if (idx < 8'd8)            return {b[idx[2:1]][{idx[0], 1'b1}], b[idx[2:1]][{idx[0], 1'b0}]};
    else if (idx == UR_ACC_LO) return a[31:0];
    else if (idx == UR_ACC_HI) return a[63:32];
    else if (idx == UR_COEFF)  return cf;
    else if (idx == UR_BITPOS) return bp;
    else                       return 32'd0;
  endfunction

  logic        e_we, e_illegal;
  logic [31:0] e_res;

  always_comb begin
    e_we      = 1'b0;
    e_illegal = 1'b0;
    e_res     = 32'd0;
    unique case (e_op)
      OP_MUL32:     begin e_we = 1'b1; e_res = mul_res; end
      OP_CLP8:      begin e_we = 1'b1; e_res = clp_res; end
      OP_SHOWBITS:  begin e_we = 1'b1; e_res = sb_bits; end
      OP_FLUSHBITS: begin e_we = 1'b1; e_res = sb_next; end
      OP_UDIV:      begin e_we = 1'b1; e_res = div_q;   end
      OP_UMOD:      begin e_we = 1'b1; e_res = div_r;   end
      OP_RUR:       begin e_we = 1'b1; e_res = ur_read(e_imm, blk_q, acc_q, coeff_q, bitpos_q); end
      OP_IH_LUMADC, OP_IH_CHROMADC: e_illegal = !HAS_IH_DC;
      OP_NOP, OP_MULADD, OP_ITRANS, OP_WUR: ;
      default:      e_illegal = 1'b1;
    endcase
  end

  // special-register update, in program order at the end of E
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      blk_q    <= '0;
      acc_q    <= '0;
      coeff_q  <= '0;
      bitpos_q <= '0;
    end else if (e_go) begin
      unique case (e_op)
        OP_MULADD:      acc_q    <= acc_next;
        OP_FLUSHBITS:   bitpos_q <= sb_next;
        OP_ITRANS:      blk_q    <= blk_itrans;
        OP_IH_LUMADC:   blk_q    <= blk_ihl;
        OP_IH_CHROMADC: blk_q    <= blk_ihc;
        OP_WUR: begin
          if (e_imm < 8'd8) begin
            blk_q[e_imm[2:1]][{e_imm[0], 1'b0}] <= e_ars[15:0];
            blk_q[e_imm[2:1]][{e_imm[0], 1'b1}] <= e_ars[31:16];
          end else if (e_imm == UR_ACC_LO) acc_q[31:0]  <= e_ars;
          else if (e_imm == UR_ACC_HI)     acc_q[63:32] <= e_ars;
          else if (e_imm == UR_COEFF)      coeff_q      <= e_ars;
          else if (e_imm == UR_BITPOS)     bitpos_q     <= e_ars;
        end
        default: ;
      endcase
    end
  end

  // ------------------------------------------------------------ M, W stages
  logic        m_valid, m_we, m_illegal;
  logic [31:0] m_data;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      m_valid    <= 1'b0;
      m_we       <= 1'b0;
      m_illegal  <= 1'b0;
      m_data     <= '0;
      wb_valid   <= 1'b0;
      wb_we      <= 1'b0;
      wb_illegal <= 1'b0;
      wb_data    <= '0;
    end else begin
      m_valid    <= e_go;
      m_we       <= e_go && e_we;
      m_illegal  <= e_go && e_illegal;
      m_data     <= e_res;
      wb_valid   <= m_valid;
      wb_we      <= m_we;
      wb_illegal <= m_illegal;
      wb_data    <= m_data;
    end
  end

  // ------------------------------------------------------------ assertions
  // An offered instruction that is not taken must be held unchanged.
  a_hold: assert property (@(posedge clk) disable iff (!rst_n)
    in_valid && !in_ready |=> in_valid && $stable(in_op) && $stable(in_ars)
                               && $stable(in_art) && $stable(in_imm));
  // The divider is only started when it is idle.
  a_div_idle: assert property (@(posedge clk) disable iff (!rst_n)
    accept && is_div(in_op) |-> !div_busy || div_done);
endmodule
