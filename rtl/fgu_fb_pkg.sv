// fgu_fb_pkg - selection codes of the FGU FB-stage output multiplexer.
package fgu_fb_pkg;
  typedef enum logic [2:0] {
    FB_FGX_DP      = 3'd0,
    FB_FGX_ODD     = 3'd1,
    FB_INT         = 3'd2,
    FB_FPX_SP_ODD  = 3'd3,
    FB_FPX_SP_EVEN = 3'd4,
    FB_FPX_DP      = 3'd5,
    FB_FPDU        = 3'd6
  } fb_sel_e;
endpackage
