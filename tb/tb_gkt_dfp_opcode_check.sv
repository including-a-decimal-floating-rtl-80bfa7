// tb_gkt_dfp_opcode_check - checks that the gasket marks the decimal
// opcodes as valid in every word position, keeps the legacy verdict for
// other words and does not validate reserved decimal-looking opcodes.
`timescale 1ns/1ps
module tb_gkt_dfp_opcode_check;
  localparam int N = 4;
  logic [N-1:0][31:0] instr;
  logic [N-1:0] legacy_valid, is_dfp, valid_opcode;
  int checks = 0, failures = 0;

  gkt_dfp_opcode_check #(.N_INSTR(N)) dut (.*);

  localparam logic [31:0] DFMADD = {2'b10, 5'd4, 6'b110111, 5'd2, 5'd8, 4'h3, 5'd6};
  localparam logic [31:0] DFDIV  = {2'b10, 5'd4, 6'b110110, 5'd2, 9'h09E, 5'd6};
  localparam logic [31:0] FADDD  = {2'b10, 5'd4, 6'b110100, 5'd2, 9'h042, 5'd6};

  task automatic chk(input logic [N-1:0] e_dfp, input logic [N-1:0] e_valid,
                     input string what);
    #1;
    checks++;
    if (is_dfp !== e_dfp || valid_opcode !== e_valid) begin
      failures++;
      $display("FAIL %s dfp=%b valid=%b", what, is_dfp, valid_opcode);
    end
  endtask

  initial begin
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // the old check rejects the decimal words (IMPDEP space)
    instr = {32'h85b09248, FADDD, DFMADD, DFDIV};
    legacy_valid = 4'b0100;
    chk(4'b1010, 4'b1110, "mix");
    instr = {DFDIV, 32'h85b09348, FADDD, 32'h85b092c8};
    legacy_valid = 4'b0010;
    chk(4'b0101, 4'b0111, "rotate");
    instr = {4{FADDD}};
    legacy_valid = 4'b1001;
    chk(4'b0000, 4'b1001, "legacy only");
    for (int i = 0; i < N; i++) begin
      instr = {4{DFDIV}};
      instr[i] = DFMADD;
      legacy_valid = '0;
      chk(N'(1) << i, N'(1) << i, "position");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
