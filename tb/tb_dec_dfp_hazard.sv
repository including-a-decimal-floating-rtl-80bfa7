// tb_dec_dfp_hazard - checks the decode-stage FGU arbitration: a lone FGU
// instruction decodes at once, conflicting groups alternate through the
// favor bit, a three-source instruction blocks every FGU instruction in the
// next cycle and steers its rs3 address to read port 2 then, non-FGU
// instructions are never stalled, and the FRF addresses follow
// {tid, r[0], r[4:1]}.
`timescale 1ns/1ps
module tb_dec_dfp_hazard;
  logic clk = 0, rst_n = 0;
  logic [1:0] valid = '0, is_fgu = '0, fgu_3src = '0;
  logic [1:0][2:0] tid = '0;
  logic [1:0][4:0] rs1 = '0, rs2 = '0, rs3 = '0;
  logic [1:0] fgu_grant, fgu_stall;
  logic fgu_issue, fgu_issue_tg, block_active, conflict;
  logic frf_rd_en1, frf_rd_en2;
  logic [7:0] frf_rd_addr1, frf_rd_addr2;
  int checks = 0, failures = 0;

  dec_dfp_hazard dut (.*);

  always #5 clk = ~clk;

  function automatic logic [7:0] fa(input logic [2:0] t, input logic [4:0] r);
    return {t, r[0], r[4:1]};
  endfunction

  task automatic chk(input logic [1:0] g, input logic [1:0] s, input logic blk,
                     input logic [7:0] a1, input logic en2, input logic [7:0] a2,
                     input string what);
    #1;
    checks++;
    if (fgu_grant !== g || fgu_stall !== s || block_active !== blk ||
        (fgu_issue && frf_rd_addr1 !== a1) || frf_rd_en2 !== en2 ||
        (en2 && frf_rd_addr2 !== a2)) begin
      failures++;
      $display("FAIL %s grant=%b stall=%b blk=%b a1=%h en2=%b a2=%h", what,
               fgu_grant, fgu_stall, block_active, frf_rd_addr1, frf_rd_en2, frf_rd_addr2);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    tid[0] = 3'd1; tid[1] = 3'd6;
    rs1[0] = 5'd2; rs2[0] = 5'd8; rs3[0] = 5'd11;
    rs1[1] = 5'd4; rs2[1] = 5'd30; rs3[1] = 5'd17;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    // lone FGU instruction in TG1
    valid = 2'b10; is_fgu = 2'b10;
    chk(2'b10, 2'b00, 0, fa(6, 4), 1, fa(6, 30), "lone tg1");
    // conflict: TG0 favoured first, then TG1, then TG0
    @(negedge clk) begin valid = 2'b11; is_fgu = 2'b11; end
    chk(2'b01, 2'b10, 0, fa(1, 2), 1, fa(1, 8), "conflict 1");
    checks++; if (!conflict) failures++;
    @(negedge clk);
    chk(2'b10, 2'b01, 0, fa(6, 4), 1, fa(6, 30), "conflict 2");
    @(negedge clk);
    chk(2'b01, 2'b10, 0, fa(1, 2), 1, fa(1, 8), "conflict 3");
    // non-FGU instructions in both groups: nothing granted or stalled
    @(negedge clk) begin valid = 2'b11; is_fgu = 2'b00; end
    chk(2'b00, 2'b00, 0, 0, 0, 0, "no fgu");
    // three-source instruction in TG1 (favor now points at TG1)
    @(negedge clk) begin valid = 2'b11; is_fgu = 2'b11; fgu_3src = 2'b10; end
    chk(2'b10, 2'b01, 0, fa(6, 4), 1, fa(6, 30), "dfma issue");
    // next cycle: blocked, rs3 on port 2
    @(negedge clk) begin fgu_3src = 2'b00; end
    chk(2'b00, 2'b11, 1, 0, 1, fa(6, 17), "dfma block");
    checks++; if (conflict || frf_rd_en1) failures++;
    @(negedge clk) begin valid = 2'b01; is_fgu = 2'b01; end
    chk(2'b01, 2'b00, 0, fa(1, 2), 1, fa(1, 8), "after block");
    // back-to-back three-source instructions from TG0
    @(negedge clk) begin fgu_3src = 2'b01; end
    chk(2'b01, 2'b00, 0, fa(1, 2), 1, fa(1, 8), "3src a");
    @(negedge clk);
    chk(2'b00, 2'b01, 1, 0, 1, fa(1, 11), "3src a block");
    @(negedge clk);
    chk(2'b01, 2'b00, 0, fa(1, 2), 1, fa(1, 8), "3src b");
    @(negedge clk) begin valid = 2'b00; is_fgu = 2'b00; fgu_3src = 2'b00; end
    chk(2'b00, 2'b00, 1, 0, 1, fa(1, 11), "3src b block");
    @(negedge clk);
    chk(2'b00, 2'b00, 0, 0, 0, 0, "idle");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
