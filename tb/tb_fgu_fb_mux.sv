// tb_fgu_fb_mux - checks every selection of the FB-stage output multiplexer,
// including the placement of single-precision results in the odd (low) and
// even (high) halves and the new decimal (FPDU) input.
`timescale 1ns/1ps
module tb_fgu_fb_mux;
  import fgu_fb_pkg::*;
  fb_sel_e sel;
  logic [63:0] fgx_result, int_result, fpx_dp_result, fpdu_result, fgu_result;
  logic [31:0] fpx_sp_result;
  int checks = 0, failures = 0;

  fgu_fb_mux dut (.*);

  task automatic chk(input fb_sel_e s, input logic [63:0] e);
    sel = s; #1;
    checks++;
    if (fgu_result !== e) begin
      failures++;
      $display("FAIL sel=%s got %h expected %h", s.name(), fgu_result, e);
    end
  endtask

  initial begin
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 4; n++) begin
      fgx_result    = {$urandom, $urandom};
      int_result    = {$urandom, $urandom};
      fpx_dp_result = {$urandom, $urandom};
      fpdu_result   = {$urandom, $urandom};
      fpx_sp_result = $urandom;
      chk(FB_FGX_DP, fgx_result);
      chk(FB_FGX_ODD, {32'd0, fgx_result[31:0]});
      chk(FB_INT, int_result);
      chk(FB_FPX_SP_ODD, {32'd0, fpx_sp_result});
      chk(FB_FPX_SP_EVEN, {fpx_sp_result, 32'd0});
      chk(FB_FPX_DP, fpx_dp_result);
      chk(FB_FPDU, fpdu_result);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
