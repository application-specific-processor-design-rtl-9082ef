// tb_asp_tie_unit_full: end-to-end test of the extension unit in its default
// configuration (every parameter at its default: MUL32, CLP8, MULADD_COEFF,
// SHOWBITS/FLUSHBITS, UDIV/UMOD, iTRANS; the inverse-Hadamard opcodes must
// retire as unconfigured). See asp_tie_tb_body.svh for the checks.
module tb_asp_tie_unit_full;
  import asp_pkg::*;
  localparam bit IH = 1'b0;
  localparam int N_RANDOM = 4000;
`include "asp_tie_tb_body.svh"

  asp_tie_unit dut (
    .clk, .rst_n, .in_valid, .in_ready, .in_op, .in_imm, .in_ars, .in_art,
    .wb_valid, .wb_we, .wb_illegal, .wb_data
  );
endmodule
