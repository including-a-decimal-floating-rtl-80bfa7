// fgu_dfp_top - the decimal extension of a multithreaded SPARC core's
// floating point and graphics unit (FGU), from instruction validity check to
// register write-back.
//
// What is here, in pipeline order:
//   gasket      gkt_dfp_opcode_check marks the five decimal opcodes as valid
//               instructions in words returned from the L2.
//   pick (P)    one pku_dfp_predecode per thread group: decimal detection,
//               FGU class, two-cycle detection, and holding a two-cycle
//               instruction back while an integer load is in decode.
//   decode (D)  a decode register per thread group, dec_dfp_hazard for the
//               FGU-FGU hazard and the DFMA/DFMS block (rs3 read in the next
//               cycle on read port 2), FRF read addresses, and the FAC
//               decimal opcode decoder (fac_dfp_decoder) on the instruction
//               that issues.
//   FX1..FX5    the DFPU (buffers, DFP FMA, DFSR) beside the binary
//               pipelines, which are outside this block: binary FGU
//               instructions leave through bfp_issue_* and their results
//               return through bfp_fb_*.
//   FB          fgu_fb_mux picks the DFPU result or a binary result, the FW
//               register drives FRF write port W1.
//   FPC         fpc_fsr_update merges the decimal flags (one cycle after the
//               result) and binary flags into the FSR and raises the trap.
// The register file itself is outside: read addresses leave in D, read data
// is expected in the next cycle (FX1), W1 writes happen on the clock edge
// while frf_wr_en = 1.
//
// Timing: an ADD/SUB/MUL decoded in cycle t writes the FRF at the end of
// cycle t+6 (same slot as a binary FPX result: FX1..FX5, FB); DFMA/DFMS one
// cycle later, the cycle after them being kept free of FGU issue. Because
// every FGU instruction has this fixed latency and only one issues per
// cycle, W1 needs no arbitration; an assertion checks that a binary and a
// decimal result never meet in FB. main_clken freezes the DFPU only; a
// caller that drops it must hold the rest of the FGU pipeline too.
module fgu_dfp_top
  import dfp_pkg::*;
  import fgu_fb_pkg::*;
#(
  parameter int N_GKT = 4                 // instruction words per gasket check
)(
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     main_clken,
  // gasket
  input  logic [N_GKT-1:0][31:0]   gkt_instr,
  input  logic [N_GKT-1:0]         gkt_legacy_valid,
  output logic [N_GKT-1:0]         gkt_valid_opcode,
  output logic [N_GKT-1:0]         gkt_is_dfp,
  // pick stage, one candidate per thread group
  input  logic [1:0]               pick_valid,
  input  logic [1:0][31:0]         pick_instr,
  input  logic [1:0][2:0]          pick_tid,
  input  logic [1:0]               pick_is_fgu,      // existing FGU pre-decode
  input  logic [1:0]               int_load_in_dec,
  output logic [1:0]               pick_accept,
  output logic [1:0]               pick_two_cycle,
  output logic [1:0]               dec_fgu_grant,
  output logic [1:0]               dec_fgu_stall,
  output logic                     dfma_block,
  output logic                     fgu_conflict,
  // floating point register file
  output logic                     frf_rd_en1,
  output logic [7:0]               frf_rd_addr1,
  output logic                     frf_rd_en2,
  output logic [7:0]               frf_rd_addr2,
  input  logic [63:0]              frf_rd_data1,
  input  logic [63:0]              frf_rd_data2,
  output logic                     frf_wr_en,
  output logic [7:0]               frf_wr_addr,
  output logic [63:0]              frf_wr_data,
  // binary FGU pipelines (FPX, FGX, FPD)
  output logic                     bfp_issue_valid,
  output logic [31:0]              bfp_issue_instr,
  output logic [2:0]               bfp_issue_tid,
  input  logic                     bfp_fb_valid,
  input  fb_sel_e                  bfp_fb_sel,
  input  logic [7:0]               bfp_fb_addr,
  input  logic [63:0]              fgx_result,
  input  logic [63:0]              int_result,
  input  logic [31:0]              fpx_sp_result,
  input  logic [63:0]              fpx_dp_result,
  input  logic                     bfp_flags_valid,
  input  logic [4:0]               bfp_cexc,
  input  logic [2:0]               bfp_ftt,
  // status registers
  input  logic                     ldfsr_en,
  input  logic [63:0]              ldfsr_data,
  output logic [63:0]              fsr,
  output logic                     ieee_trap,
  input  logic                     dfsr_wr_en,
  input  logic [7:0]               dfsr_wr_data,
  output logic [7:0]               dfsr_value,
  output logic                     dfpu_buffer_used
);

  // ------------------------------------------------------------------
  // Gasket
  // ------------------------------------------------------------------
  gkt_dfp_opcode_check #(.N_INSTR(N_GKT)) u_gkt (
    .instr(gkt_instr), .legacy_valid(gkt_legacy_valid),
    .is_dfp(gkt_is_dfp), .valid_opcode(gkt_valid_opcode)
  );

  // ------------------------------------------------------------------
  // Pick stage and decode registers
  // ------------------------------------------------------------------
  typedef struct packed {
    logic        valid;
    logic [31:0] instr;
    logic [2:0]  tid;
    logic        is_fgu;
    logic        is_dfp;
    logic        fgu_3src;
  } dec_slot_t;

  dec_slot_t  d_q [2];
  logic [1:0] p_is_dfp, p_is_fgu, p_3src, p_two_cycle, p_ok;
  logic [1:0] d_valid, d_fgu, d_3src;
  logic [1:0][2:0] d_tid;
  logic [1:0][4:0] d_rs1, d_rs2, d_rs3;
  logic [1:0] grant, stall;
  logic       issue, issue_tg;

  for (genvar g = 0; g < 2; g++) begin : g_tg
    pku_dfp_predecode u_pku (
      .instr(pick_instr[g]), .valid(pick_valid[g]), .is_fgu_in(pick_is_fgu[g]),
      .int_load_in_dec(int_load_in_dec[g]),
      .is_dfp(p_is_dfp[g]), .is_fgu(p_is_fgu[g]), .fgu_3src(p_3src[g]),
      .two_cycle(p_two_cycle[g]), .pick_ok(p_ok[g])
    );

    assign pick_accept[g] = p_ok[g] && !stall[g];

    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) d_q[g] <= '0;
      else if (!stall[g])
        d_q[g] <= '{valid: pick_accept[g], instr: pick_instr[g], tid: pick_tid[g],
                    is_fgu: p_is_fgu[g], is_dfp: p_is_dfp[g], fgu_3src: p_3src[g]};
    end

    assign d_valid[g] = d_q[g].valid;
    assign d_fgu[g]   = d_q[g].is_fgu;
    assign d_3src[g]  = d_q[g].fgu_3src;
    assign d_tid[g]   = d_q[g].tid;
    assign d_rs1[g]   = d_q[g].instr[18:14];
    assign d_rs2[g]   = d_q[g].instr[4:0];
    assign d_rs3[g]   = d_q[g].instr[13:9];
  end

  dec_dfp_hazard u_haz (
    .clk, .rst_n,
    .valid(d_valid), .is_fgu(d_fgu), .fgu_3src(d_3src), .tid(d_tid),
    .rs1(d_rs1), .rs2(d_rs2), .rs3(d_rs3),
    .fgu_grant(grant), .fgu_stall(stall), .fgu_issue(issue), .fgu_issue_tg(issue_tg),
    .block_active(dfma_block), .conflict(fgu_conflict),
    .frf_rd_en1, .frf_rd_addr1, .frf_rd_en2, .frf_rd_addr2
  );

  assign dec_fgu_stall  = stall;
  assign dec_fgu_grant  = grant;
  assign pick_two_cycle = p_two_cycle;

  // FAC decimal decoder on the issuing instruction
  dec_slot_t  iss;
  logic       dec_decimal;
  dfp_op_e    dec_op;
  logic       f_dadd, f_dsub, f_dmul, f_dfma, f_dfms;

  assign iss = d_q[issue_tg];

  fac_dfp_decoder u_fac (
    .instr(iss.instr), .valid(issue), .decimal_op(dec_decimal), .dec_operation(dec_op),
    .dadd(f_dadd), .dsub(f_dsub), .dmul(f_dmul), .dfma(f_dfma), .dfms(f_dfms)
  );

  assign bfp_issue_valid = issue && !dec_decimal;
  assign bfp_issue_instr = iss.instr;
  assign bfp_issue_tid   = iss.tid;

  // ------------------------------------------------------------------
  // FX1 registers and the DFPU
  // ------------------------------------------------------------------
  logic       fx1_valid;
  dfp_op_e    fx1_op;
  logic [7:0] fx1_tag;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      fx1_valid <= 1'b0;
      fx1_op    <= DOP_FMA;
      fx1_tag   <= '0;
    end else begin
      fx1_valid <= dec_decimal;
      fx1_op    <= dec_op;
      fx1_tag   <= {iss.tid, iss.instr[25], iss.instr[29:26]};
    end
  end

  logic        dfpu_valid;
  logic [63:0] dfpu_result;
  logic [7:0]  dfpu_tag;
  logic        dflags_valid;
  dfp_flags_t  dflags;

  dfpu #(.TAG_W(8)) u_dfpu (
    .clk, .rst_n, .main_clken,
    .valid_fx1(fx1_valid), .dec_operation(fx1_op),
    .rs1_fx1(frf_rd_data1), .rs2_fx1(frf_rd_data2), .tag_fx1(fx1_tag),
    .result_valid(dfpu_valid), .result_fb(dfpu_result), .result_tag(dfpu_tag),
    .dflags_valid, .dflags,
    .dfsr_wr_en, .dfsr_wr_data, .dfsr_value,
    .buffer_used(dfpu_buffer_used)
  );

  // ------------------------------------------------------------------
  // FB stage: output multiplexer and the FW register feeding W1
  // ------------------------------------------------------------------
  logic [63:0] fb_result;

  fgu_fb_mux u_fb (
    .sel(dfpu_valid ? FB_FPDU : bfp_fb_sel),
    .fgx_result, .int_result, .fpx_sp_result, .fpx_dp_result,
    .fpdu_result(dfpu_result), .fgu_result(fb_result)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      frf_wr_en   <= 1'b0;
      frf_wr_addr <= '0;
      frf_wr_data <= '0;
    end else begin
      frf_wr_en   <= dfpu_valid || bfp_fb_valid;
      frf_wr_addr <= dfpu_valid ? dfpu_tag : bfp_fb_addr;
      frf_wr_data <= fb_result;
    end
  end

  a_w1_single_source: assert property (@(posedge clk) disable iff (!rst_n)
    !(dfpu_valid && bfp_fb_valid));

  // ------------------------------------------------------------------
  // FSR update in the FPC
  // ------------------------------------------------------------------
  fpc_fsr_update u_fpc (
    .clk, .rst_n,
    .dflags_valid, .dflags,
    .b_valid(bfp_flags_valid), .b_cexc(bfp_cexc), .b_ftt(bfp_ftt),
    .ldfsr_en, .ldfsr_data, .fsr, .ieee_trap
  );

endmodule
