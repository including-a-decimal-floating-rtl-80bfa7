// dfpu - Decimal Floating Point Unit, a pipeline inside the FGU beside the
// binary add/multiply (FPX), divide (FPD) and graphics (FGX) pipelines.
//
// Three parts: the operand buffers (dfpu_buffers), the Decimal64 fused
// multiply-add (dfp_fma) and the decimal status register (dfsr). The FAD
// side of the FGU delivers the register file sources rs1_fx1/rs2_fx1 in FX1
// and the FAC delivers the 3-bit decimal operation (dec_operation). The FMA
// rounds with DFSR.round; its flags are written into DFSR.flags and leave
// the unit as dflags one cycle later, for the FSR update in the FPC.
//
// Timing (main_clken = 1): an ADD/SUB/MUL whose sources are in FX1 in cycle
// t has result_fb/result_valid in cycle t+4 (FX5), ready for the FB stage;
// DFMA/DFMS, whose third source arrives in t+1, complete in t+5. dflags and
// dflags_valid follow one cycle after the result. Tags (the destination
// register and thread) travel with each operation. main_clken freezes the
// whole unit.
module dfpu
  import dfp_pkg::*;
#(
  parameter int TAG_W = 8
)(
  input  logic             clk,
  input  logic             rst_n,
  input  logic             main_clken,
  input  logic             valid_fx1,
  input  dfp_op_e          dec_operation,
  input  logic [63:0]      rs1_fx1,
  input  logic [63:0]      rs2_fx1,
  input  logic [TAG_W-1:0] tag_fx1,
  output logic             result_valid,
  output logic [63:0]      result_fb,
  output logic [TAG_W-1:0] result_tag,
  output logic             dflags_valid,
  output dfp_flags_t       dflags,
  input  logic             dfsr_wr_en,
  input  logic [7:0]       dfsr_wr_data,
  output logic [7:0]       dfsr_value,
  output logic             buffer_used    // an FMA launch took A/B from the buffer
);
  logic             fma_valid;
  dfp_op_e          selopr;
  logic [63:0]      op_a, op_b, op_c;
  logic [TAG_W-1:0] fma_tag;
  dfp_rnd_e         round;
  dfp_flags_t       fma_flags;

  dfpu_buffers #(.TAG_W(TAG_W)) u_buf (
    .clk, .rst_n, .en(main_clken),
    .in_valid(valid_fx1), .dec_operation, .rs1_fx1, .rs2_fx1, .in_tag(tag_fx1),
    .out_valid(fma_valid), .selopr, .opA(op_a), .opB(op_b), .opC(op_c),
    .out_tag(fma_tag), .buffered(buffer_used)
  );

  dfp_fma #(.TAG_W(TAG_W)) u_fma (
    .clk, .rst_n, .en(main_clken),
    .in_valid(fma_valid), .in_op(selopr), .in_rnd(round),
    .in_a(op_a), .in_b(op_b), .in_c(op_c), .in_tag(fma_tag),
    .out_valid(result_valid), .out_result(result_fb), .out_flags(fma_flags),
    .out_tag(result_tag)
  );

  dfsr u_dfsr (
    .clk, .rst_n, .en(main_clken),
    .flags_valid(result_valid), .flags_in(fma_flags),
    .wr_en(dfsr_wr_en), .wr_data(dfsr_wr_data),
    .round, .flags(dflags), .value(dfsr_value)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)          dflags_valid <= 1'b0;
    else if (main_clken) dflags_valid <= result_valid;
  end
endmodule
