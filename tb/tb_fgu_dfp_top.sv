// tb_fgu_dfp_top - end-to-end testbench of the decimal FGU extension, at the
// default parameters of fgu_dfp_top.
//
// Around the design the testbench provides:
//  * a floating point register file (256 x 64, two read ports answering in
//    the cycle after the address, one write port), preloaded with operands,
//  * a model of the binary FGU pipelines: every binary instruction that
//    issues returns a random result five cycles later through the FB
//    multiplexer (random output format) and its flags one cycle after that,
//  * two thread-group instruction streams mixing decimal instructions
//    (DFADDd/DFSUBd/DFMULd/DFMADDd/DFMSUBd), binary FGU instructions and
//    integer instructions, with random "integer load in decode" events.
// The decimal operands and expected results are the reference vectors of
// tb/dfp_fma_vectors.hex (the first three are the add, subtract and
// multiply examples of the test programs).
//
// Phase 1: rounding to nearest-even, no trap enabled. Phase 2: software
// writes the DFSR to round toward -infinity and loads the FSR with the
// invalid trap enabled; vectors with that rounding and the invalid-operation
// vectors run.
//
// Checks: every register write (address, data, and that it comes exactly
// six cycles after the instruction decodes, seven for DFMADDd/DFMSUBd),
// the final register contents, no lost or extra writes, the binary issue
// interface, gasket validity, aexc accumulation, ftt and the number of IEEE
// traps. Each mechanism below must be seen at least once, otherwise it
// counts as a failure: FGU-FGU conflict, DFMA block (with the other group
// stalled), two-cycle pick hold, buffered FMA launch, direct two-source
// launch, binary result through FB, IEEE trap, aexc accumulation, gasket
// decimal detection, DFSR rounding change.
`timescale 1ns/1ps
module tb_fgu_dfp_top;
  import dfp_pkg::*;
  import fgu_fb_pkg::*;

  localparam int NVEC = 136;
  localparam int N_GKT = 4;

  // ------------------------------------------------------------------
  // DUT
  // ------------------------------------------------------------------
  logic clk = 1'b0, rst_n = 1'b0, main_clken = 1'b1;
  logic [N_GKT-1:0][31:0] gkt_instr = '0;
  logic [N_GKT-1:0] gkt_legacy_valid = '0, gkt_valid_opcode, gkt_is_dfp;
  logic [1:0] pick_valid = '0;
  logic [1:0][31:0] pick_instr = '0;
  logic [1:0][2:0] pick_tid = '0;
  logic [1:0] pick_is_fgu = '0, int_load_in_dec = '0;
  logic [1:0] pick_accept, pick_two_cycle, dec_fgu_grant, dec_fgu_stall;
  logic dfma_block, fgu_conflict;
  logic frf_rd_en1, frf_rd_en2, frf_wr_en;
  logic [7:0] frf_rd_addr1, frf_rd_addr2, frf_wr_addr;
  logic [63:0] frf_rd_data1 = '0, frf_rd_data2 = '0, frf_wr_data;
  logic bfp_issue_valid;
  logic [31:0] bfp_issue_instr;
  logic [2:0] bfp_issue_tid;
  logic bfp_fb_valid;
  fb_sel_e bfp_fb_sel;
  logic [7:0] bfp_fb_addr;
  logic [63:0] fgx_result, int_result, fpx_dp_result;
  logic [31:0] fpx_sp_result;
  logic bfp_flags_valid;
  logic [4:0] bfp_cexc;
  logic [2:0] bfp_ftt;
  logic ldfsr_en = 1'b0;
  logic [63:0] ldfsr_data = '0, fsr;
  logic ieee_trap;
  logic dfsr_wr_en = 1'b0;
  logic [7:0] dfsr_wr_data = '0, dfsr_value;
  logic dfpu_buffer_used;

  fgu_dfp_top dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  task automatic fail(input string msg);
    failures++;
    $display("FAIL %s (t=%0t)", msg, $time);
  endtask

  initial begin
    #5000000;
    fail("watchdog timeout");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ------------------------------------------------------------------
  // Register file model
  // ------------------------------------------------------------------
  logic [63:0] frf [256];

  always @(posedge clk) begin
    if (frf_rd_en1) frf_rd_data1 <= frf[frf_rd_addr1];
    if (frf_rd_en2) frf_rd_data2 <= frf[frf_rd_addr2];
    if (frf_wr_en)  frf[frf_wr_addr] <= frf_wr_data;
  end

  function automatic logic [7:0] fa(input logic [2:0] t, input logic [4:0] r);
    return {t, r[0], r[4:1]};
  endfunction

  // ------------------------------------------------------------------
  // Instruction streams
  // ------------------------------------------------------------------
  typedef enum int { K_INT, K_BIN, K_DEC } kind_e;
  typedef struct {
    logic [31:0] instr;
    logic [2:0]  tid;
    kind_e       kind;
    logic        three_src;
    logic [63:0] result;      // decimal: expected result
    logic [4:0]  flags;       // decimal: {dz nx nv of uf}
  } ins_t;

  ins_t stream [2][$];
  ins_t dslot [2];
  logic dslot_v [2];

  logic [271:0] vec [NVEC];

  function automatic logic [31:0] f3(input logic [4:0] rd, rs1, rs2, input logic [8:0] opf);
    return {2'b10, rd, 6'b110110, rs1, opf, rs2};
  endfunction
  function automatic logic [31:0] f4(input logic [4:0] rd, rs1, rs2, rs3, input logic [3:0] op5);
    return {2'b10, rd, 6'b110111, rs1, rs3, op5, rs2};
  endfunction

  int n_dec_phase = 0;
  int n_nv_phase = 0;
  logic [4:0] exp_aexc = '0;

  // Builds both streams from the vectors selected for a phase and preloads
  // the operands. Thread n%8 gets the n-th vector in registers 4k..4k+3.
  task automatic build_phase(input int sel_rnd, input bit with_nv);
    int n = 0;
    int nbin [8];
    foreach (nbin[i]) nbin[i] = 0;
    n_dec_phase = 0;
    n_nv_phase = 0;
    for (int i = 0; i < NVEC; i++) begin
      logic [3:0] op_n, rnd_n;
      logic [63:0] a, b, c, r;
      logic [7:0] fl;
      bit nv, take;
      ins_t it;
      logic [2:0] t;
      logic [4:0] base;
      {op_n, rnd_n, a, b, c, r, fl} = vec[i];
      nv = fl[2];
      take = with_nv ? (nv || int'(rnd_n) == sel_rnd) : (!nv && int'(rnd_n) == sel_rnd);
      if (!take || n >= 48) continue;
      t = 3'(n % 8);
      base = 5'(4 * (n / 8));
      n++;
      frf[fa(t, base)]     = a;
      frf[fa(t, base + 1)] = (op_n[2:0] == DOP_ADD || op_n[2:0] == DOP_SUB) ? c : b;
      frf[fa(t, base + 2)] = c;
      frf[fa(t, base + 3)] = 64'hBAD0_BAD0_BAD0_BAD0;
      it.tid = t;
      it.kind = K_DEC;
      it.result = r;
      it.flags = {1'b0, fl[3:0]};
      it.three_src = (op_n[2:1] == 2'b00);
      unique case (op_n[2:0])
        DOP_ADD: it.instr = f3(base + 3, base, base + 1, 9'h092);
        DOP_SUB: it.instr = f3(base + 3, base, base + 1, 9'h096);
        DOP_MUL: it.instr = f3(base + 3, base, base + 1, 9'h09A);
        DOP_FMA: it.instr = f4(base + 3, base, base + 1, base + 2, 4'h3);
        default: it.instr = f4(base + 3, base, base + 1, base + 2, 4'h7);
      endcase
      if (nv) n_nv_phase++;
      n_dec_phase++;
      stream[t[2]].push_back(it);
      // some binary and integer instructions of the same thread group
      if ($urandom_range(0, 9) < 4) begin
        ins_t bi;
        logic [2:0] bt;
        bt = {t[2], 2'($urandom_range(0, 3))};
        bi.tid = bt;
        bi.kind = K_BIN;
        bi.three_src = 1'b0;
        bi.result = '0;
        bi.flags = '0;
        bi.instr = f3(5'(24 + nbin[bt] % 8), 5'd28, 5'd29, 9'h042);   // FADDd
        nbin[bt]++;
        stream[t[2]].push_back(bi);
      end
      if ($urandom_range(0, 9) < 3) begin
        ins_t ii;
        ii.tid = {t[2], 2'($urandom_range(0, 3))};
        ii.kind = K_INT;
        ii.three_src = 1'b0;
        ii.result = '0;
        ii.flags = '0;
        ii.instr = {2'b10, 5'd1, 6'b000000, 5'd2, 9'h000, 5'd3};       // add %g2,%g3,%g1
        stream[t[2]].push_back(ii);
      end
    end
  endtask

  // ------------------------------------------------------------------
  // Binary pipeline model: issue at decode edge N, FB during the cycle
  // ending at edge N+5, flags during the cycle ending at N+6.
  // ------------------------------------------------------------------
  typedef struct packed {
    logic        v;
    logic [7:0]  addr;
    logic [2:0]  sel;
    logic [63:0] r64a;
    logic [63:0] r64b;
    logic [31:0] r32;
    logic [4:0]  cexc;
  } bop_t;

  bop_t bpipe [6];
  int unsigned cyc = 0;

  typedef struct {
    logic [7:0]  addr;
    logic [63:0] data;
  } wr_t;
  wr_t exp_w [int unsigned];

  function automatic logic [63:0] fb_value(input bop_t b);
    unique case (fb_sel_e'(b.sel))
      FB_FGX_DP:      return b.r64a;
      FB_FGX_ODD:     return {32'd0, b.r64a[31:0]};
      FB_INT:         return b.r64b;
      FB_FPX_SP_ODD:  return {32'd0, b.r32};
      FB_FPX_SP_EVEN: return {b.r32, 32'd0};
      default:        return b.r64b;        // FB_FPX_DP
    endcase
  endfunction

  always_comb begin
    bfp_fb_valid  = bpipe[4].v;
    bfp_fb_sel    = fb_sel_e'(bpipe[4].sel);
    bfp_fb_addr   = bpipe[4].addr;
    fgx_result    = bpipe[4].r64a;
    int_result    = bpipe[4].r64b;
    fpx_dp_result = bpipe[4].r64b;
    fpx_sp_result = bpipe[4].r32;
    bfp_flags_valid = bpipe[5].v;
    bfp_cexc      = bpipe[5].cexc;
    bfp_ftt       = 3'd0;
  end

  // ------------------------------------------------------------------
  // Mechanism counters
  // ------------------------------------------------------------------
  int m_conflict = 0, m_block = 0, m_pick_hold = 0, m_buffered = 0;
  int m_direct = 0, m_binary_fb = 0, m_trap = 0, m_aexc = 0, m_gkt = 0;
  int m_dfsr_round = 0;
  int n_writes_dec = 0, n_writes_bin = 0, n_traps = 0;
  bit phase2 = 1'b0;

  // ------------------------------------------------------------------
  // Clocked monitor: pipeline bookkeeping and checks
  // ------------------------------------------------------------------
  always @(posedge clk) if (rst_n) begin
    bop_t nb;
    cyc <= cyc + 1;
    if (fgu_conflict) m_conflict++;
    if (dfma_block && |dec_fgu_stall) m_block++;
    if (dfpu_buffer_used) m_buffered++;
    if (ieee_trap) n_traps++;
    for (int g = 0; g < 2; g++)
      if (pick_valid[g] && pick_two_cycle[g] && int_load_in_dec[g] && !pick_accept[g] &&
          !dec_fgu_stall[g]) m_pick_hold++;

    // register writes
    if (frf_wr_en) begin
      checks++;
      if (!exp_w.exists(cyc)) begin
        fail($sformatf("unexpected write addr %h data %h at cycle %0d", frf_wr_addr, frf_wr_data, cyc));
      end else begin
        if (frf_wr_addr !== exp_w[cyc].addr || frf_wr_data !== exp_w[cyc].data)
          fail($sformatf("write at cycle %0d: addr %h data %h, expected addr %h data %h",
                         cyc, frf_wr_addr, frf_wr_data, exp_w[cyc].addr, exp_w[cyc].data));
        exp_w.delete(cyc);
      end
    end
    foreach (exp_w[k])
      if (k < cyc) begin
        fail($sformatf("missing write to %h due at cycle %0d", exp_w[k].addr, k));
        exp_w.delete(k);
      end

    // binary pipeline shift
    nb = '0;
    if (bfp_issue_valid) begin
      checks++;
      if (!dslot_v[dec_fgu_grant[1]] || dslot[dec_fgu_grant[1]].kind != K_BIN ||
          bfp_issue_instr !== dslot[dec_fgu_grant[1]].instr ||
          bfp_issue_tid !== dslot[dec_fgu_grant[1]].tid)
        fail("binary issue does not match the decoded instruction");
      nb.v    = 1'b1;
      nb.addr = fa(bfp_issue_tid, bfp_issue_instr[29:25]);
      nb.sel  = 3'($urandom_range(0, 5));
      nb.r64a = {$urandom, $urandom};
      nb.r64b = {$urandom, $urandom};
      nb.r32  = $urandom;
      nb.cexc = phase2 ? 5'b00001 : (($urandom_range(0, 1) != 0) ? 5'b01001 : 5'b00001);
      exp_w[cyc + 6] = '{nb.addr, fb_value(nb)};
      exp_aexc |= nb.cexc & ~fsr[27:23];
      n_writes_bin++;
    end
    if (bfp_fb_valid) m_binary_fb++;
    bpipe[5] <= bpipe[4];
    bpipe[4] <= bpipe[3];
    bpipe[3] <= bpipe[2];
    bpipe[2] <= bpipe[1];
    bpipe[1] <= bpipe[0];
    bpipe[0] <= nb;

    // decode slots: issue, then advance from pick
    for (int g = 0; g < 2; g++) begin
      if (dec_fgu_grant[g]) begin
        checks++;
        if (!dslot_v[g] || dslot[g].kind == K_INT)
          fail($sformatf("group %0d granted without an FGU instruction", g));
        else if (dslot[g].kind == K_DEC) begin
          exp_w[cyc + (dslot[g].three_src ? 7 : 6)] =
            '{fa(dslot[g].tid, dslot[g].instr[29:25]), dslot[g].result};
          if (!dslot[g].three_src) m_direct++;
          exp_aexc |= {dslot[g].flags[2], dslot[g].flags[1], dslot[g].flags[0],
                       dslot[g].flags[4], dslot[g].flags[3]} & ~fsr[27:23];
          n_writes_dec++;
        end
      end
      if (dslot_v[g] && dslot[g].kind != K_INT && !dec_fgu_grant[g] && !dec_fgu_stall[g])
        fail($sformatf("group %0d FGU instruction neither granted nor stalled", g));
      if (!dec_fgu_stall[g]) begin
        dslot_v[g] = pick_accept[g];
        if (pick_accept[g]) dslot[g] = stream[g].pop_front();
      end
    end

    // gasket
    for (int i = 0; i < N_GKT; i++) begin
      logic dec_word;
      dec_word = gkt_instr[i][31:30] == 2'b10 &&
                 ((gkt_instr[i][24:19] == 6'b110110 &&
                   (gkt_instr[i][13:5] == 9'h092 || gkt_instr[i][13:5] == 9'h096 ||
                    gkt_instr[i][13:5] == 9'h09A)) ||
                  (gkt_instr[i][24:19] == 6'b110111 &&
                   (gkt_instr[i][8:5] == 4'h3 || gkt_instr[i][8:5] == 4'h7)));
      checks++;
      if (gkt_is_dfp[i] !== dec_word || gkt_valid_opcode[i] !== (dec_word || gkt_legacy_valid[i]))
        fail($sformatf("gasket word %0d %h", i, gkt_instr[i]));
      if (dec_word && gkt_valid_opcode[i]) m_gkt++;
    end
  end

  // ------------------------------------------------------------------
  // Stimulus at the falling edge
  // ------------------------------------------------------------------
  bit feeding = 1'b0;

  always @(negedge clk) if (rst_n) begin
    for (int g = 0; g < 2; g++) begin
      if (feeding && stream[g].size() != 0 && $urandom_range(0, 9) != 0) begin
        pick_valid[g]  <= 1'b1;
        pick_instr[g]  <= stream[g][0].instr;
        pick_tid[g]    <= stream[g][0].tid;
        pick_is_fgu[g] <= (stream[g][0].kind == K_BIN);
      end else begin
        pick_valid[g]  <= 1'b0;
        pick_instr[g]  <= '0;
        pick_is_fgu[g] <= 1'b0;
      end
      int_load_in_dec[g] <= ($urandom_range(0, 4) == 0);
    end
    for (int i = 0; i < N_GKT; i++) begin
      int g, k;
      g = $urandom_range(0, 1);
      if (stream[g].size() != 0) begin
        k = $urandom_range(0, stream[g].size() - 1);
        gkt_instr[i] <= stream[g][k].instr;
        gkt_legacy_valid[i] <= (stream[g][k].kind != K_DEC) ? 1'b1 : 1'($urandom_range(0, 1));
      end else begin
        gkt_instr[i] <= {2'b10, 5'd4, 6'b110110, 5'd2, 9'h09E, 5'd6};   // reserved DFDIVd
        gkt_legacy_valid[i] <= 1'b0;
      end
    end
  end

  task automatic drain();
    while (stream[0].size() != 0 || stream[1].size() != 0) @(negedge clk);
    feeding = 1'b0;
    repeat (20) @(negedge clk);
  endtask

  // Final register contents of a phase: every decimal destination holds its result
  logic [63:0] phase_dst [logic [7:0]];

  task automatic remember_dests();
    phase_dst.delete();
    for (int g = 0; g < 2; g++)
      foreach (stream[g][k])
        if (stream[g][k].kind == K_DEC)
          phase_dst[fa(stream[g][k].tid, stream[g][k].instr[29:25])] = stream[g][k].result;
  endtask

  task automatic check_dests(input string ph);
    foreach (phase_dst[a]) begin
      checks++;
      if (frf[a] !== phase_dst[a])
        fail($sformatf("%s: register %h holds %h, expected %h", ph, a, frf[a], phase_dst[a]));
    end
  endtask

  initial begin
    int dec1, bin1, exp_traps;
    foreach (frf[i]) frf[i] = '0;
    foreach (bpipe[i]) bpipe[i] = '0;
    dslot_v[0] = 1'b0;
    dslot_v[1] = 1'b0;
    $readmemh("tb/dfp_fma_vectors.hex", vec);
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;

    // ---------------- phase 1 ----------------
    build_phase(0, 1'b0);
    remember_dests();
    dec1 = n_dec_phase;
    @(negedge clk) feeding = 1'b1;
    drain();
    check_dests("phase 1");
    checks++;
    if (n_writes_dec != dec1) fail($sformatf("%0d of %0d decimal results", n_writes_dec, dec1));
    checks++;
    if (fsr[9:5] !== exp_aexc) fail($sformatf("aexc %b expected %b", fsr[9:5], exp_aexc));
    if (fsr[9:5] != 0) m_aexc++;
    checks++;
    if (n_traps != 0) fail("trap with all traps disabled");
    bin1 = n_writes_bin;

    // ---------------- phase 2 ----------------
    phase2 = 1'b1;
    @(negedge clk) begin
      dfsr_wr_en   = 1'b1;
      dfsr_wr_data = {RND_RM, 5'd0};
      ldfsr_en     = 1'b1;
      ldfsr_data   = 64'h0000_0000_0800_0000;     // tem.nvm
    end
    @(negedge clk) begin
      dfsr_wr_en = 1'b0;
      ldfsr_en   = 1'b0;
    end
    checks++;
    if (dfsr_value !== {RND_RM, 5'd0} || fsr[27:23] !== 5'b10000 || fsr[9:5] !== 5'd0)
      fail($sformatf("status registers after software write: dfsr %h fsr %h", dfsr_value, fsr));
    exp_aexc = '0;
    build_phase(3, 1'b1);
    remember_dests();
    exp_traps = n_nv_phase;
    n_writes_dec = 0;
    @(negedge clk) feeding = 1'b1;
    drain();
    check_dests("phase 2");
    if (n_writes_dec == n_dec_phase && n_dec_phase > n_nv_phase) m_dfsr_round++;
    checks++;
    if (n_writes_dec != n_dec_phase) fail($sformatf("%0d of %0d decimal results", n_writes_dec, n_dec_phase));
    checks++;
    if (n_traps != exp_traps) fail($sformatf("%0d traps, expected %0d", n_traps, exp_traps));
    m_trap = n_traps;
    checks++;
    if (fsr[9:5] !== exp_aexc) fail($sformatf("phase 2 aexc %b expected %b", fsr[9:5], exp_aexc));
    checks++;
    if (exp_w.size() != 0) fail("writes still outstanding");

    $display("decimal writes phase1 %0d, binary writes %0d; conflicts %0d, blocks %0d, pick holds %0d",
             dec1, bin1, m_conflict, m_block, m_pick_hold);
    $display("buffered launches %0d, direct %0d, binary FB %0d, traps %0d, gasket %0d",
             m_buffered, m_direct, m_binary_fb, m_trap, m_gkt);
    checks++; if (m_conflict == 0)   fail("mechanism never seen: FGU-FGU conflict");
    checks++; if (m_block == 0)      fail("mechanism never seen: DFMA block stalling decode");
    checks++; if (m_pick_hold == 0)  fail("mechanism never seen: two-cycle pick hold");
    checks++; if (m_buffered == 0)   fail("mechanism never seen: buffered FMA launch");
    checks++; if (m_direct == 0)     fail("mechanism never seen: two-source launch");
    checks++; if (m_binary_fb == 0)  fail("mechanism never seen: binary FB write");
    checks++; if (m_trap == 0)       fail("mechanism never seen: IEEE trap");
    checks++; if (m_aexc == 0)       fail("mechanism never seen: aexc accumulation");
    checks++; if (m_gkt == 0)        fail("mechanism never seen: gasket decimal opcode");
    checks++; if (m_dfsr_round == 0) fail("mechanism never seen: DFSR rounding change");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
