// dfpu_buffers - operand buffers and source multiplexers in front of the
// DFP FMA.
//
// The register file has two read ports, so the three-source DFMA/DFMS
// instructions read rs1 and rs2 in their first cycle and rs3 (delivered on
// the rs2 read path) in the next one. For such an operation the buffer keeps
// the two early sources and the operation code for one cycle, then launches
// the FMA with opA/opB from the buffer and opC taken directly from rs2_fx1.
// Two-source operations (ADD, SUB, MUL) bypass the buffer and start in the
// cycle their sources arrive: opA = rs1_fx1, opB = opC = rs2_fx1 (the FMA
// itself uses B for MUL and C for ADD/SUB).
//
// Interface: in_valid/dec_operation/tag qualify rs1_fx1/rs2_fx1; out_valid
// with selopr, opA, opB, opC and out_tag go to the FMA in the same cycle
// (combinational outputs, one buffered cycle for DFMA/DFMS). The decoder
// guarantees no new FGU instruction arrives in the cycle after a DFMA/DFMS;
// an assertion checks it.
module dfpu_buffers
  import dfp_pkg::*;
#(
  parameter int TAG_W = 8
)(
  input  logic             clk,
  input  logic             rst_n,
  input  logic             en,
  input  logic             in_valid,
  input  dfp_op_e          dec_operation,
  input  logic [63:0]      rs1_fx1,
  input  logic [63:0]      rs2_fx1,
  input  logic [TAG_W-1:0] in_tag,
  output logic             out_valid,
  output dfp_op_e          selopr,
  output logic [63:0]      opA,
  output logic [63:0]      opB,
  output logic [63:0]      opC,
  output logic [TAG_W-1:0] out_tag,
  output logic             buffered      // this launch used the buffer
);
  logic             pend;
  dfp_op_e          buf_op;
  logic [63:0]      buf_rs1, buf_rs2;
  logic [TAG_W-1:0] buf_tag;
  logic             three_src;

  assign three_src = (dec_operation == DOP_FMA) || (dec_operation == DOP_FMS);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pend    <= 1'b0;
      buf_op  <= DOP_FMA;
      buf_rs1 <= '0;
      buf_rs2 <= '0;
      buf_tag <= '0;
    end else if (en) begin
      pend <= in_valid && three_src && !pend;
      if (in_valid && three_src && !pend) begin
        buf_op  <= dec_operation;
        buf_rs1 <= rs1_fx1;
        buf_rs2 <= rs2_fx1;
        buf_tag <= in_tag;
      end
    end
  end

  always_comb begin
    buffered = pend;
    if (pend) begin
      out_valid = 1'b1;
      selopr    = buf_op;
      opA       = buf_rs1;
      opB       = buf_rs2;
      opC       = rs2_fx1;
      out_tag   = buf_tag;
    end else begin
      out_valid = in_valid && !three_src;
      selopr    = dec_operation;
      opA       = rs1_fx1;
      opB       = rs2_fx1;
      opC       = rs2_fx1;
      out_tag   = in_tag;
    end
  end

  // No FGU instruction may follow a DFMA/DFMS in the next cycle
  a_no_issue_after_fma: assert property (@(posedge clk) disable iff (!rst_n)
    en && pend |-> !in_valid);
endmodule
