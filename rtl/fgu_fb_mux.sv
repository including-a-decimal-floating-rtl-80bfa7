// fgu_fb_mux - output-format multiplexer of the FGU FB stage, extended with
// the DFPU result.
//
// Selects the 64-bit value written back through the FRF W1 port from:
//   FB_FGX_DP      graphics pipeline result, full 64 bits
//   FB_FGX_ODD     graphics single result in the odd (low) half
//   FB_INT         integer/constant result of the stage-5 multiplexer
//   FB_FPX_SP_ODD  binary single-precision result in the low half
//   FB_FPX_SP_EVEN binary single-precision result in the high half
//   FB_FPX_DP      binary double-precision result
//   FB_FPDU        decimal result from the DFPU
// Unused halves are zero. Purely combinational; the caller registers it.
module fgu_fb_mux (
  input  fgu_fb_pkg::fb_sel_e sel,
  input  logic [63:0]         fgx_result,
  input  logic [63:0]         int_result,
  input  logic [31:0]         fpx_sp_result,
  input  logic [63:0]         fpx_dp_result,
  input  logic [63:0]         fpdu_result,
  output logic [63:0]         fgu_result
);
  import fgu_fb_pkg::*;

  always_comb begin
    unique case (sel)
      FB_FGX_DP:      fgu_result = fgx_result;
      FB_FGX_ODD:     fgu_result = {32'd0, fgx_result[31:0]};
      FB_INT:         fgu_result = int_result;
      FB_FPX_SP_ODD:  fgu_result = {32'd0, fpx_sp_result};
      FB_FPX_SP_EVEN: fgu_result = {fpx_sp_result, 32'd0};
      FB_FPX_DP:      fgu_result = fpx_dp_result;
      FB_FPDU:        fgu_result = fpdu_result;
      default:        fgu_result = '0;
    endcase
  end
endmodule
