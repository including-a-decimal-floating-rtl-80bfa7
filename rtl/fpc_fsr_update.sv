// fpc_fsr_update - Floating-Point State Register (FSR) and its update from
// binary and decimal results, in the floating point control unit (FPC).
//
// FSR fields kept: rd[31:30], tem[27:23], ns[22], ver[19:17] (read-only),
// ftt[16:14], qne[13] (always 0), fcc0[11:10], fcc1..3[37:32],
// aexc[9:5], cexc[4:0]; all other bits read as zero. The exception fields
// use the order nv, of, uf, dz, nx (bit 4..0), whereas the decimal flags
// arrive as {dz, nx, nv, of, uf} and are reordered here.
//
// When a decimal operation completes (dflags_valid), its flags are checked
// against the trap enable mask: any flag whose tem bit is set raises an
// IEEE-754 trap (ieee_trap) and sets ftt = 1 (IEEE_754_exception); without
// one ftt is cleared. cexc receives the flags of the operation; flags whose
// tem bit is clear also accumulate into aexc. Binary completions (b_valid,
// b_cexc, b_ftt) follow the same rules, and when both complete in the same
// cycle their flags are ORed before they are written. ldfsr_en loads the
// FSR from software (load-FSR), and has priority.
//
// Timing: one register stage, the FSR changes on the clock edge of the
// valid cycle; ieee_trap is combinational in that cycle.
module fpc_fsr_update
  import dfp_pkg::*;
#(
  parameter logic [2:0] FPU_VER = 3'd0     // FSR.ver of this implementation
)(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        dflags_valid,
  input  dfp_flags_t  dflags,
  input  logic        b_valid,
  input  logic [4:0]  b_cexc,            // nv of uf dz nx
  input  logic [2:0]  b_ftt,
  input  logic        ldfsr_en,
  input  logic [63:0] ldfsr_data,
  output logic [63:0] fsr,
  output logic        ieee_trap
);
  logic [1:0] rd_q;
  logic [4:0] tem_q, aexc_q, cexc_q;
  logic       ns_q;
  logic [2:0] ftt_q;
  logic [1:0] fcc0_q;
  logic [5:0] fcc123_q;

  logic [4:0] d_cexc, all_cexc, trap_bits;

  assign d_cexc    = {dflags.nv, dflags.of, dflags.uf, dflags.dz, dflags.nx};
  assign all_cexc  = (dflags_valid ? d_cexc : 5'd0) | (b_valid ? b_cexc : 5'd0);
  assign trap_bits = all_cexc & tem_q;
  assign ieee_trap = (dflags_valid || b_valid) && |trap_bits;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rd_q     <= '0;
      tem_q    <= '0;
      ns_q     <= 1'b0;
      ftt_q    <= '0;
      fcc0_q   <= '0;
      fcc123_q <= '0;
      aexc_q   <= '0;
      cexc_q   <= '0;
    end else if (ldfsr_en) begin
      rd_q     <= ldfsr_data[31:30];
      tem_q    <= ldfsr_data[27:23];
      ns_q     <= ldfsr_data[22];
      ftt_q    <= ldfsr_data[16:14];
      fcc0_q   <= ldfsr_data[11:10];
      fcc123_q <= ldfsr_data[37:32];
      aexc_q   <= ldfsr_data[9:5];
      cexc_q   <= ldfsr_data[4:0];
    end else if (dflags_valid || b_valid) begin
      cexc_q <= all_cexc;
      aexc_q <= aexc_q | (all_cexc & ~tem_q);
      if (|trap_bits)        ftt_q <= 3'd1;
      else if (dflags_valid) ftt_q <= 3'd0;
      else                   ftt_q <= b_ftt;
    end
  end

  always_comb begin
    fsr        = '0;
    fsr[37:32] = fcc123_q;
    fsr[31:30] = rd_q;
    fsr[27:23] = tem_q;
    fsr[22]    = ns_q;
    fsr[19:17] = FPU_VER;
    fsr[16:14] = ftt_q;
    fsr[11:10] = fcc0_q;
    fsr[9:5]   = aexc_q;
    fsr[4:0]   = cexc_q;
  end
endmodule
