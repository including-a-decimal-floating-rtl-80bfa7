// pku_dfp_predecode - pick-stage pre-decode for one thread group.
//
// Marks an instruction as decimal (the five DFP opcodes, recognised with
// fac_dfp_decoder), adds decimal instructions to the FGU class, and flags
// two-cycle instructions: the three-source FGU operations DFMADDd, DFMSUBd
// and PDIST (op=10 op3=110110 opf=0x03E), and the alternate-space accesses
// LDFA (op=11 op3=110000), STFA (op=11 op3=110100) and CASA (op=11
// op3=111100). A two-cycle instruction may not be picked while an integer
// load is in decode, because the second cycle of a two-cycle instruction is
// not checked for dependencies; pick_ok reports whether the candidate may go.
//
// is_fgu_in carries the pre-decode of the existing binary FGU instructions,
// which this block extends but does not repeat. Purely combinational.
module pku_dfp_predecode
  import dfp_pkg::*;
(
  input  logic [31:0] instr,
  input  logic        valid,
  input  logic        is_fgu_in,        // existing FGU pre-decode
  input  logic        int_load_in_dec,  // an integer load sits in decode
  output logic        is_dfp,
  output logic        is_fgu,
  output logic        fgu_3src,         // DFMA/DFMS/PDIST
  output logic        two_cycle,
  output logic        pick_ok
);
  logic    dadd, dsub, dmul, dfma, dfms;
  dfp_op_e unused_op;
  logic    pdist, ldfa, stfa, casa;

  fac_dfp_decoder u_dec (
    .instr, .valid, .decimal_op(is_dfp), .dec_operation(unused_op),
    .dadd, .dsub, .dmul, .dfma, .dfms
  );

  assign pdist = valid && instr[31:30] == 2'b10 && instr[24:19] == 6'b110110 &&
                 instr[13:5] == 9'h03E;
  assign ldfa  = valid && instr[31:30] == 2'b11 && instr[24:19] == 6'b110000;
  assign stfa  = valid && instr[31:30] == 2'b11 && instr[24:19] == 6'b110100;
  assign casa  = valid && instr[31:30] == 2'b11 && instr[24:19] == 6'b111100;

  assign is_fgu    = valid && (is_fgu_in || is_dfp);
  assign fgu_3src  = dfma || dfms || pdist;
  assign two_cycle = fgu_3src || ldfa || stfa || casa;
  assign pick_ok   = valid && !(two_cycle && int_load_in_dec);
endmodule
