// gkt_dfp_opcode_check - instruction validity check in the gasket.
//
// Instruction words arriving from the L2 through the cache-to-processor
// crossbar are partially decoded by the gasket, which marks each one as a
// valid opcode or not. The five decimal instructions (DFADDd, DFSUBd,
// DFMULd, DFMADDd, DFMSUBd) are added to the valid set here, so that they
// are passed on to the core pipeline; legacy_valid carries the verdict of
// the existing check for every other opcode.
//
// N_INSTR instruction words are checked in parallel (four 32-bit words of a
// 16-byte return is this implementation's default). Purely combinational.
module gkt_dfp_opcode_check
  import dfp_pkg::*;
#(
  parameter int N_INSTR = 4
)(
  input  logic [N_INSTR-1:0][31:0] instr,
  input  logic [N_INSTR-1:0]       legacy_valid,
  output logic [N_INSTR-1:0]       is_dfp,
  output logic [N_INSTR-1:0]       valid_opcode
);
  for (genvar i = 0; i < N_INSTR; i++) begin : g_word
    logic    dadd, dsub, dmul, dfma, dfms;
    dfp_op_e unused_op;
    fac_dfp_decoder u_dec (
      .instr(instr[i]), .valid(1'b1), .decimal_op(is_dfp[i]),
      .dec_operation(unused_op), .dadd, .dsub, .dmul, .dfma, .dfms
    );
    assign valid_opcode[i] = legacy_valid[i] || is_dfp[i];
  end
endmodule
