// tb_fac_dfp_decoder - checks the decimal opcode decoder with the three
// instruction words of the add, subtract and multiply test programs
// (0x85b09248, 0x85b092c8, 0x85b09348), constructed DFMADDd/DFMSUBd words,
// neighbouring opcodes that must not decode (DFDIVd, other op5 values,
// binary FADDd, loads) and the valid qualifier.
`timescale 1ns/1ps
module tb_fac_dfp_decoder;
  import dfp_pkg::*;

  logic [31:0] instr;
  logic        valid;
  logic        decimal_op, dadd, dsub, dmul, dfma, dfms;
  dfp_op_e     dec_operation;
  int checks = 0, failures = 0;

  fac_dfp_decoder dut (.*);

  function automatic logic [31:0] f3(input logic [4:0] rd, rs1, rs2,
                                     input logic [8:0] opf);
    return {2'b10, rd, 6'b110110, rs1, opf, rs2};
  endfunction
  function automatic logic [31:0] f4(input logic [4:0] rd, rs1, rs2, rs3,
                                     input logic [3:0] op5);
    return {2'b10, rd, 6'b110111, rs1, rs3, op5, rs2};
  endfunction

  task automatic expect_op(input logic [31:0] w, input logic dec,
                           input dfp_op_e op, input string what);
    instr = w; valid = 1'b1; #1;
    checks++;
    if (decimal_op !== dec || (dec && dec_operation !== op) ||
        (32'(dadd) + 32'(dsub) + 32'(dmul) + 32'(dfma) + 32'(dfms)) != 32'(dec)) begin
      failures++;
      $display("FAIL %s instr=%h dec=%b op=%b", what, w, decimal_op, dec_operation);
    end
  endtask

  initial begin
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    expect_op(32'h85b09248, 1'b1, DOP_ADD, "test program add");
    checks++; if (!dadd) failures++;
    expect_op(32'h85b092c8, 1'b1, DOP_SUB, "test program sub");
    checks++; if (!dsub) failures++;
    expect_op(32'h85b09348, 1'b1, DOP_MUL, "test program mul");
    checks++; if (!dmul) failures++;
    expect_op(f4(5'd4, 5'd2, 5'd6, 5'd8, 4'h3), 1'b1, DOP_FMA, "dfmadd");
    checks++; if (!dfma) failures++;
    expect_op(f4(5'd4, 5'd2, 5'd6, 5'd8, 4'h7), 1'b1, DOP_FMS, "dfmsub");
    checks++; if (!dfms) failures++;
    expect_op(f3(5'd2, 5'd2, 5'd8, 9'h09E), 1'b0, DOP_FMA, "dfdiv reserved");
    expect_op(f3(5'd2, 5'd2, 5'd8, 9'h042), 1'b0, DOP_FMA, "faddd");
    expect_op(f4(5'd4, 5'd2, 5'd6, 5'd8, 4'h2), 1'b0, DOP_FMA, "fmaddd");
    expect_op(f4(5'd4, 5'd2, 5'd6, 5'd8, 4'hB), 1'b0, DOP_FMA, "dfnmadd");
    expect_op({2'b11, 5'd2, 6'b110110, 19'h0}, 1'b0, DOP_FMA, "op=11");
    expect_op({2'b10, 5'd2, 6'b110100, 5'd2, 9'h092, 5'd8}, 1'b0, DOP_FMA, "fpop1");
    for (int r = 0; r < 32; r += 7)
      expect_op(f3(5'(r), 5'(31 - r), 5'(r + 3), 9'h096), 1'b1, DOP_SUB, "regs");
    instr = 32'h85b09248; valid = 1'b0; #1;
    checks++;
    if (decimal_op || dadd) begin failures++; $display("FAIL invalid slot decoded"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
