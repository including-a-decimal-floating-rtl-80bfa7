// tb_dfp_decode - checks the Decimal64 DPD decoder against reference
// encodings (sign, exponent and 16-digit significand worked out
// independently), including extreme exponents, large leading digits (8, 9)
// and the special classes infinity, quiet NaN and signalling NaN.
`timescale 1ns/1ps
module tb_dfp_decode;
  import dfp_pkg::*;

  typedef struct packed {
    logic [63:0] word;
    logic        sign;
    logic signed [12:0] exp;
    logic [63:0] sig;
  } vec_t;

  localparam int NV = 24;
  localparam vec_t VECS [NV] = '{
    '{64'h2238000000000001, 1'b0, 13'sd0, 64'h0000000000000001},
    '{64'ha238000000000005, 1'b1, 13'sd0, 64'h0000000000000005},
    '{64'h2238000000000000, 1'b0, 13'sd0, 64'h0000000000000000},
    '{64'h8000000000000000, 1'b1, -13'sd398, 64'h0000000000000000},
    '{64'h77fcff3fcff3fcff, 1'b0, 13'sd369, 64'h9999999999999999},
    '{64'h0000000000000001, 1'b0, -13'sd398, 64'h0000000000000001},
    '{64'h6a106e1b86e1b86e, 1'b0, -13'sd10, 64'h8888888888888888},
    '{64'h263934b9c1e28e56, 1'b0, 13'sd0, 64'h1234567890123456},
    '{64'h23cb8f0000000005, 1'b0, 13'sd100, 64'h0987000000000005},
    '{64'hc0bb9167bea0918c, 1'b1, 13'sd160, 64'h0711992786024902},
    '{64'h21e80000079b0b9c, 1'b0, -13'sd20, 64'h0000000079542916},
    '{64'hf0d252337171840d, 1'b1, 13'sd166, 64'h8452941617061801},
    '{64'hc0a40000025ed657, 1'b1, 13'sd155, 64'h0000000025735457},
    '{64'h4a2b9359f2a2f4e9, 1'b0, 13'sd252, 64'h2713267682931169},
    '{64'hc3dc00000001a2f4, 1'b1, 13'sd361, 64'h0000000000068574},
    '{64'h4174000000000001, 1'b0, 13'sd207, 64'h0000000000000001},
    '{64'h204c000000000038, 1'b0, -13'sd123, 64'h0000000000000038},
    '{64'h9e249509e767550d, 1'b1, -13'sd261, 64'h7115027476355803},
    '{64'h23e8000e4735a3e4, 1'b0, 13'sd108, 64'h0000039073268764},
    '{64'hc20400000046a106, 1'b1, 13'sd243, 64'h0000000004328206},
    '{64'hc0880001e7ce9161, 1'b1, 13'sd148, 64'h0000007874724261},
    '{64'hc2e832e119a6d080, 1'b1, 13'sd300, 64'h0032704390334100},
    '{64'h432c000000000004, 1'b0, 13'sd317, 64'h0000000000000004},
    '{64'h4368001dcd7a43fd, 1'b0, 13'sd332, 64'h0000077157510977}
  };

  logic [63:0]   operand;
  dfp_unpacked_t u;
  int checks = 0, failures = 0;

  dfp_decode dut (.operand, .unpacked(u));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s operand=%h", what, operand);
    end
  endtask

  initial begin
    for (int i = 0; i < NV; i++) begin
      operand = VECS[i].word;
      #1;
      check(u.sign == VECS[i].sign, "sign");
      check(u.exp == VECS[i].exp, "exp");
      check(u.sig == VECS[i].sig, "sig");
      check(u.is_zero == (VECS[i].sig == '0), "zero");
      check(!u.is_nan && !u.is_inf && !u.is_snan, "class finite");
    end
    operand = 64'hF800_0000_0000_0000; #1;
    check(u.is_inf && u.sign && !u.is_nan && !u.is_zero, "-inf");
    operand = 64'h7C00_0000_0000_0123; #1;
    check(u.is_nan && !u.is_snan && !u.is_inf && u.payload == 50'h123, "qNaN");
    operand = 64'h7E00_0000_0000_0001; #1;
    check(u.is_nan && u.is_snan, "sNaN");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
