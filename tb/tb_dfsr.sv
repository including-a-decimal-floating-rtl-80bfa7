// tb_dfsr - checks the decimal status register: reset value, software
// write of rounding and flags, the reserved rounding code 111 falling back to
// nearest-even, flag capture one cycle after a valid update, the enable, and
// the priority of a flag update over a same-cycle software write.
`timescale 1ns/1ps
module tb_dfsr;
  import dfp_pkg::*;
  logic clk = 0, rst_n = 0, en = 1, flags_valid = 0, wr_en = 0;
  dfp_flags_t flags_in = '0, flags;
  logic [7:0] wr_data = '0, value;
  dfp_rnd_e round;
  int checks = 0, failures = 0;

  dfsr dut (.*);

  always #5 clk = ~clk;

  task automatic chk(input logic [7:0] e, input string what);
    checks++;
    if (value !== e) begin
      failures++;
      $display("FAIL %s value=%h expected %h", what, value, e);
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
    chk(8'h00, "reset");
    rst_n = 1;
    @(negedge clk) begin wr_en = 1; wr_data = {3'b100, 5'b00011}; end
    @(negedge clk) wr_en = 0;
    chk({3'b100, 5'b00011}, "write rz");
    checks++; if (round != RND_RZ) failures++;
    @(negedge clk) begin wr_en = 1; wr_data = 8'hE0; end
    @(negedge clk) wr_en = 0;
    chk(8'h00, "reserved rounding");
    @(negedge clk) begin flags_valid = 1; flags_in = 5'b01000; end
    chk(8'h00, "not yet");
    @(negedge clk) flags_valid = 0;
    chk(8'h08, "flags captured");
    @(negedge clk) begin en = 0; flags_valid = 1; flags_in = 5'b10000; wr_en = 1; wr_data = 8'h40; end
    @(negedge clk) begin en = 1; flags_valid = 0; wr_en = 0; end
    chk(8'h08, "enable off");
    @(negedge clk) begin flags_valid = 1; flags_in = 5'b00101; wr_en = 1; wr_data = 8'hBF; end
    @(negedge clk) begin flags_valid = 0; wr_en = 0; end
    chk({3'b101, 5'b00101}, "update wins flags");
    checks++; if (round != RND_RNA || flags.nv != 1'b1 || flags.uf != 1'b1) failures++;
    rst_n = 0; #1;
    chk(8'h00, "async reset");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
