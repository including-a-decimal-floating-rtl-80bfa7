// dec_dfp_hazard - FGU issue arbitration in the decode stage, with the
// DFMA/DFMS block hazard.
//
// Each thread group (TG0, TG1) presents at most one decoded instruction per
// cycle. Only one FGU instruction can issue per cycle, and decimal
// instructions count as FGU instructions:
//  * FGU-FGU hazard: when both groups hold an FGU instruction, a favor bit
//    picks the one that decodes; the other stalls. The favor bit flips after
//    every such conflict, so the groups alternate.
//  * Three-source block: in the cycle after a DFMADDd/DFMSUBd (or PDIST)
//    decodes, no FGU instruction of either group decodes, because the
//    register file's second read port fetches that instruction's rs3. The
//    rs3 address is held here and steered to read port 2 in that cycle.
// Non-FGU instructions are not touched by this block.
//
// FRF addressing: 32 double registers per thread, 256 entries in all. The
// 5-bit SPARC double register field r maps to index {r[0], r[4:1]} and the
// entry address is {tid, index}.
//
// Timing: grant/stall and the read addresses are combinational in decode;
// the favor bit and the rs3 hold are registers. The read data returns in
// the next cycle (FX1).
module dec_dfp_hazard (
  input  logic             clk,
  input  logic             rst_n,
  input  logic [1:0]       valid,        // per thread group
  input  logic [1:0]       is_fgu,
  input  logic [1:0]       fgu_3src,
  input  logic [1:0][2:0]  tid,
  input  logic [1:0][4:0]  rs1,
  input  logic [1:0][4:0]  rs2,
  input  logic [1:0][4:0]  rs3,
  output logic [1:0]       fgu_grant,    // this group's FGU instruction decodes
  output logic [1:0]       fgu_stall,    // this group's FGU instruction waits
  output logic             fgu_issue,
  output logic             fgu_issue_tg,
  output logic             block_active, // three-source block in effect
  output logic             conflict,     // both groups wanted the FGU
  output logic             frf_rd_en1,
  output logic [7:0]       frf_rd_addr1,
  output logic             frf_rd_en2,
  output logic [7:0]       frf_rd_addr2
);
  logic       favor;        // 0: TG0 wins a conflict, 1: TG1
  logic       block_q;
  logic [7:0] rs3_hold;
  logic [1:0] want;

  function automatic logic [7:0] frf_addr(input logic [2:0] t, input logic [4:0] r);
    return {t, r[0], r[4:1]};
  endfunction

  assign want     = valid & is_fgu;
  assign conflict = !block_q && want[0] && want[1];

  always_comb begin
    fgu_grant = 2'b00;
    if (!block_q) begin
      if (conflict)     fgu_grant[favor] = 1'b1;
      else if (want[0]) fgu_grant[0] = 1'b1;
      else if (want[1]) fgu_grant[1] = 1'b1;
    end
  end

  assign fgu_stall    = want & ~fgu_grant;
  assign fgu_issue    = |fgu_grant;
  assign fgu_issue_tg = fgu_grant[1];
  assign block_active = block_q;

  always_comb begin
    frf_rd_en1   = fgu_issue;
    frf_rd_addr1 = frf_addr(tid[fgu_issue_tg], rs1[fgu_issue_tg]);
    frf_rd_en2   = fgu_issue || block_q;
    frf_rd_addr2 = block_q ? rs3_hold : frf_addr(tid[fgu_issue_tg], rs2[fgu_issue_tg]);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      favor    <= 1'b0;
      block_q  <= 1'b0;
      rs3_hold <= '0;
    end else begin
      if (conflict) favor <= ~favor;
      block_q <= fgu_issue && fgu_3src[fgu_issue_tg];
      if (fgu_issue && fgu_3src[fgu_issue_tg])
        rs3_hold <= frf_addr(tid[fgu_issue_tg], rs3[fgu_issue_tg]);
    end
  end
endmodule
