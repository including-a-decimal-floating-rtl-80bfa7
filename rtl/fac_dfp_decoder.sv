// fac_dfp_decoder - decimal opcode decoder of the floating point control
// unit (FAC).
//
// Looks at the op, op3, opf and op5 fields of a SPARC instruction and
// recognises the five implemented decimal instructions:
//   DFADDd  op=10 op3=110110 (IMPDEP1) opf=0x092
//   DFSUBd  op=10 op3=110110           opf=0x096
//   DFMULd  op=10 op3=110110           opf=0x09A
//   DFMADDd op=10 op3=110111 (IMPDEP2) op5=0x3
//   DFMSUBd op=10 op3=110111           op5=0x7
// It raises decimal_op for any of them and produces the 3-bit selection code
// for the DFPU (FMA 000, FMS 001, MUL 100, ADD 110, SUB 111; the 0X0, 0X1
// and 10X rows of the selection table with X taken as 0). The reserved
// DFDIVd and the negated fused forms are not decoded as decimal operations.
// Purely combinational; the decode happens in the cycle the instruction is
// in decode and its result is registered with the instruction.
module fac_dfp_decoder
  import dfp_pkg::*;
(
  input  logic [31:0] instr,
  input  logic        valid,
  output logic        decimal_op,
  output dfp_op_e     dec_operation,
  output logic        dadd,
  output logic        dsub,
  output logic        dmul,
  output logic        dfma,
  output logic        dfms
);
  logic       arith, impdep1, impdep2;
  logic [8:0] opf;
  logic [3:0] op5;

  assign arith   = valid && (instr[31:30] == 2'b10);
  assign impdep1 = arith && (instr[24:19] == 6'b110110);
  assign impdep2 = arith && (instr[24:19] == 6'b110111);
  assign opf     = instr[13:5];
  assign op5     = instr[8:5];

  assign dadd = impdep1 && (opf == 9'h092);
  assign dsub = impdep1 && (opf == 9'h096);
  assign dmul = impdep1 && (opf == 9'h09A);
  assign dfma = impdep2 && (op5 == 4'h3);
  assign dfms = impdep2 && (op5 == 4'h7);

  assign decimal_op = dadd || dsub || dmul || dfma || dfms;

  always_comb begin
    dec_operation = DOP_FMA;
    if (dfms) dec_operation = DOP_FMS;
    if (dmul) dec_operation = DOP_MUL;
    if (dadd) dec_operation = DOP_ADD;
    if (dsub) dec_operation = DOP_SUB;
  end
endmodule
