// tb_asp_tie_unit: end-to-end test of the extension unit with the optional
// inverse-Hadamard datapaths enabled (HAS_IH_DC = 1), so that every
// instruction of the design runs. See asp_tie_tb_body.svh for the stimulus,
// the reference model and the checks.
module tb_asp_tie_unit;
  import asp_pkg::*;
  localparam bit IH = 1'b1;
  localparam int N_RANDOM = 4000;
`include "asp_tie_tb_body.svh"

  asp_tie_unit #(.HAS_IH_DC(1'b1)) dut (
    .clk, .rst_n, .in_valid, .in_ready, .in_op, .in_imm, .in_ars, .in_art,
    .wb_valid, .wb_we, .wb_illegal, .wb_data
  );
endmodule
