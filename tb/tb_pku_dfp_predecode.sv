// tb_pku_dfp_predecode - checks the pick-stage pre-decode: decimal
// instructions join the FGU class, DFMADDd/DFMSUBd/PDIST/LDFA/STFA/CASA are
// two-cycle instructions, and a two-cycle instruction is held back while an
// integer load is in decode, while ordinary instructions are not.
`timescale 1ns/1ps
module tb_pku_dfp_predecode;
  logic [31:0] instr;
  logic valid, is_fgu_in, int_load_in_dec;
  logic is_dfp, is_fgu, fgu_3src, two_cycle, pick_ok;
  int checks = 0, failures = 0;

  pku_dfp_predecode dut (.*);

  task automatic chk(input logic [31:0] w, input logic fgu_in, input logic ld,
                     input logic e_dfp, input logic e_fgu, input logic e_3src,
                     input logic e_two, input logic e_ok, input string what);
    instr = w; valid = 1'b1; is_fgu_in = fgu_in; int_load_in_dec = ld; #1;
    checks++;
    if ({is_dfp, is_fgu, fgu_3src, two_cycle, pick_ok} !==
        {e_dfp, e_fgu, e_3src, e_two, e_ok}) begin
      failures++;
      $display("FAIL %s got %b", what, {is_dfp, is_fgu, fgu_3src, two_cycle, pick_ok});
    end
  endtask

  initial begin
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  localparam logic [31:0] DFMADD = {2'b10, 5'd4, 6'b110111, 5'd2, 5'd8, 4'h3, 5'd6};
  localparam logic [31:0] DFMSUB = {2'b10, 5'd4, 6'b110111, 5'd2, 5'd8, 4'h7, 5'd6};
  localparam logic [31:0] PDIST  = {2'b10, 5'd4, 6'b110110, 5'd2, 9'h03E, 5'd6};
  localparam logic [31:0] LDFA   = {2'b11, 5'd4, 6'b110000, 5'd2, 14'h0};
  localparam logic [31:0] STFA   = {2'b11, 5'd4, 6'b110100, 5'd2, 14'h0};
  localparam logic [31:0] CASA   = {2'b11, 5'd4, 6'b111100, 5'd2, 14'h0};
  localparam logic [31:0] FADDD  = {2'b10, 5'd4, 6'b110100, 5'd2, 9'h042, 5'd6};
  localparam logic [31:0] ADDX   = {2'b10, 5'd4, 6'b000000, 5'd2, 9'h000, 5'd6};

  initial begin
    //        instr        fgu ld  dfp fgu 3s two ok
    chk(32'h85b09248,     0, 0,   1,  1,  0, 0,  1, "dfadd");
    chk(32'h85b09348,     0, 1,   1,  1,  0, 0,  1, "dfmul ld");
    chk(DFMADD,           0, 0,   1,  1,  1, 1,  1, "dfmadd");
    chk(DFMADD,           0, 1,   1,  1,  1, 1,  0, "dfmadd held");
    chk(DFMSUB,           0, 1,   1,  1,  1, 1,  0, "dfmsub held");
    chk(PDIST,            1, 0,   0,  1,  1, 1,  1, "pdist");
    chk(PDIST,            1, 1,   0,  1,  1, 1,  0, "pdist held");
    chk(LDFA,             0, 1,   0,  0,  0, 1,  0, "ldfa held");
    chk(STFA,             0, 0,   0,  0,  0, 1,  1, "stfa");
    chk(CASA,             0, 1,   0,  0,  0, 1,  0, "casa held");
    chk(FADDD,            1, 1,   0,  1,  0, 0,  1, "faddd");
    chk(ADDX,             0, 1,   0,  0,  0, 0,  1, "int add");
    instr = DFMADD; valid = 1'b0; #1;
    checks++;
    if (is_dfp || is_fgu || pick_ok) begin failures++; $display("FAIL invalid"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
