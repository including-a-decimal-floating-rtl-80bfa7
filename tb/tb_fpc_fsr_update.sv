// tb_fpc_fsr_update - checks the FSR update: decimal flags reordered into
// cexc, accumulation into aexc, trap raising with ftt = 1 when a flag is
// enabled in tem (and no aexc update for it), load-FSR priority, binary
// completions and simultaneous binary/decimal completions, and the
// read-only version field.
`timescale 1ns/1ps
module tb_fpc_fsr_update;
  import dfp_pkg::*;
  logic clk = 0, rst_n = 0;
  logic dflags_valid = 0, b_valid = 0, ldfsr_en = 0;
  dfp_flags_t dflags = '0;
  logic [4:0] b_cexc = '0;
  logic [2:0] b_ftt = '0;
  logic [63:0] ldfsr_data = '0, fsr;
  logic ieee_trap;
  int checks = 0, failures = 0;

  fpc_fsr_update #(.FPU_VER(3'd0)) dut (.*);

  always #5 clk = ~clk;

  task automatic chk(input logic [4:0] tem, input logic [2:0] ftt,
                     input logic [4:0] aexc, input logic [4:0] cexc, input string what);
    checks++;
    if (fsr[27:23] !== tem || fsr[16:14] !== ftt || fsr[9:5] !== aexc ||
        fsr[4:0] !== cexc || fsr[19:17] !== 3'd0) begin
      failures++;
      $display("FAIL %s fsr=%h", what, fsr);
    end
  endtask

  task automatic chk_trap(input logic e, input string what);
    #1;
    checks++;
    if (ieee_trap !== e) begin
      failures++;
      $display("FAIL %s trap=%b", what, ieee_trap);
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
    @(negedge clk) rst_n = 1;
    chk(0, 0, 0, 0, "reset");
    // decimal inexact ({dz nx nv of uf} = 01000) -> cexc nx (bit 0)
    @(negedge clk) begin dflags_valid = 1; dflags = 5'b01000; end
    chk_trap(0, "nx no trap");
    @(negedge clk) dflags_valid = 0;
    chk(0, 0, 5'b00001, 5'b00001, "nx");
    // decimal invalid -> cexc nv (bit 4), aexc accumulates
    @(negedge clk) begin dflags_valid = 1; dflags = 5'b00100; end
    @(negedge clk) dflags_valid = 0;
    chk(0, 0, 5'b10001, 5'b10000, "nv");
    // overflow+inexact, underflow, division by zero bits
    @(negedge clk) begin dflags_valid = 1; dflags = 5'b11011; end
    @(negedge clk) dflags_valid = 0;
    chk(0, 0, 5'b11111, 5'b01111, "of uf dz nx");
    // load FSR: tem = nv|nx, clear aexc, rd = 2, fcc bits
    @(negedge clk) begin ldfsr_en = 1; ldfsr_data = 64'h0000_0015_8880_0C00; dflags_valid = 1; dflags = 5'b00100; end
    @(negedge clk) begin ldfsr_en = 0; dflags_valid = 0; end
    chk(5'b10001, 0, 0, 0, "ldfsr priority");
    checks++; if (fsr[31:30] !== 2'b10 || fsr[11:10] !== 2'b11 || fsr[37:32] !== 6'h15 || fsr[22] !== 1'b0) begin failures++; $display("FAIL ldfsr fields %h", fsr); end
    // enabled decimal invalid -> trap, ftt=1, cexc set, aexc unchanged
    @(negedge clk) begin dflags_valid = 1; dflags = 5'b00100; end
    chk_trap(1, "nv trap");
    @(negedge clk) dflags_valid = 0;
    chk(5'b10001, 3'd1, 0, 5'b10000, "nv trapped");
    // disabled underflow: no trap, ftt cleared, aexc uf
    @(negedge clk) begin dflags_valid = 1; dflags = 5'b00001; end
    chk_trap(0, "uf no trap");
    @(negedge clk) dflags_valid = 0;
    chk(5'b10001, 0, 5'b00100, 5'b00100, "uf");
    // binary completion alone carries its ftt
    @(negedge clk) begin b_valid = 1; b_cexc = 5'b00010; b_ftt = 3'd0; end
    @(negedge clk) b_valid = 0;
    chk(5'b10001, 0, 5'b00110, 5'b00010, "binary dz");
    // simultaneous binary inexact (enabled) and decimal overflow
    @(negedge clk) begin b_valid = 1; b_cexc = 5'b00001; dflags_valid = 1; dflags = 5'b00010; end
    chk_trap(1, "merged trap");
    @(negedge clk) begin b_valid = 0; dflags_valid = 0; end
    chk(5'b10001, 3'd1, 5'b01110, 5'b01001, "merged");
    rst_n = 0; #1;
    chk(0, 0, 0, 0, "async reset");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
