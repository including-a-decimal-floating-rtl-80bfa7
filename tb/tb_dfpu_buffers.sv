// tb_dfpu_buffers - checks the operand buffers: two-source operations pass
// straight through in the cycle their sources arrive, and DFMA/DFMS keep rs1
// and rs2 for one cycle and launch with rs3 taken from the rs2 path in the
// second cycle, with the right operation code and tag.
`timescale 1ns/1ps
module tb_dfpu_buffers;
  import dfp_pkg::*;
  localparam int TAG_W = 8;
  logic clk = 0, rst_n = 0, en = 1, in_valid = 0;
  dfp_op_e dec_operation = DOP_ADD, selopr;
  logic [63:0] rs1_fx1 = '0, rs2_fx1 = '0, opA, opB, opC;
  logic [TAG_W-1:0] in_tag = '0, out_tag;
  logic out_valid, buffered;
  int checks = 0, failures = 0;

  dfpu_buffers #(.TAG_W(TAG_W)) dut (.*);

  always #5 clk = ~clk;

  task automatic chk(input logic v, input dfp_op_e op, input logic [63:0] a,
                     input logic [63:0] b, input logic [63:0] c,
                     input logic [7:0] tag, input logic buf_e, input string what);
    #1;
    checks++;
    if (out_valid !== v || (v && (selopr !== op || opA !== a || opB !== b ||
        opC !== c || out_tag !== tag || buffered !== buf_e))) begin
      failures++;
      $display("FAIL %s v=%b op=%b A=%h B=%h C=%h tag=%h buf=%b", what, out_valid,
               selopr, opA, opB, opC, out_tag, buffered);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk) begin in_valid = 1; dec_operation = DOP_ADD; rs1_fx1 = 64'h1; rs2_fx1 = 64'h2; in_tag = 8'h11; end
    chk(1, DOP_ADD, 64'h1, 64'h2, 64'h2, 8'h11, 0, "add");
    @(negedge clk) begin dec_operation = DOP_MUL; rs1_fx1 = 64'h3; rs2_fx1 = 64'h4; in_tag = 8'h12; end
    chk(1, DOP_MUL, 64'h3, 64'h4, 64'h4, 8'h12, 0, "mul back to back");
    @(negedge clk) begin dec_operation = DOP_FMA; rs1_fx1 = 64'hA; rs2_fx1 = 64'hB; in_tag = 8'h21; end
    chk(0, DOP_FMA, 0, 0, 0, 0, 0, "fma first cycle");
    @(negedge clk) begin in_valid = 0; dec_operation = DOP_ADD; rs1_fx1 = 64'hDEAD; rs2_fx1 = 64'hC; in_tag = 8'h00; end
    chk(1, DOP_FMA, 64'hA, 64'hB, 64'hC, 8'h21, 1, "fma launch");
    @(negedge clk) begin in_valid = 1; dec_operation = DOP_FMS; rs1_fx1 = 64'h5; rs2_fx1 = 64'h6; in_tag = 8'h22; end
    chk(0, DOP_FMS, 0, 0, 0, 0, 0, "fms first cycle");
    @(negedge clk) begin in_valid = 0; rs2_fx1 = 64'h7; end
    chk(1, DOP_FMS, 64'h5, 64'h6, 64'h7, 8'h22, 1, "fms launch");
    @(negedge clk) begin in_valid = 1; dec_operation = DOP_SUB; rs1_fx1 = 64'h8; rs2_fx1 = 64'h9; in_tag = 8'h23; end
    chk(1, DOP_SUB, 64'h8, 64'h9, 64'h9, 8'h23, 0, "sub after fms");
    @(negedge clk) in_valid = 0;
    chk(0, DOP_SUB, 0, 0, 0, 0, 0, "idle");
    // enable low freezes the buffer
    @(negedge clk) begin in_valid = 1; dec_operation = DOP_FMA; rs1_fx1 = 64'hE; rs2_fx1 = 64'hF; in_tag = 8'h30; end
    @(negedge clk) begin en = 0; in_valid = 0; rs2_fx1 = 64'h10; end
    chk(1, DOP_FMA, 64'hE, 64'hF, 64'h10, 8'h30, 1, "held while disabled");
    @(negedge clk) en = 1;
    chk(1, DOP_FMA, 64'hE, 64'hF, 64'h10, 8'h30, 1, "launch after enable");
    @(negedge clk);
    chk(0, DOP_FMA, 0, 0, 0, 0, 0, "done");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
