// dfp_decode - decoding stage of the decimal FMA: unpacks a Decimal64 operand
// in DPD encoding into sign, unbiased exponent, 16 BCD significand digits and
// its class (zero, infinity, quiet or signalling NaN).
//
// The combination field G[4:0] = bits 62:58 selects the class. 11111 is a
// NaN (bit 57 set means signalling), 11110 an infinity. Otherwise, when G[4:3]
// is 11 the exponent MSBs are G[2:1] and the leading digit is 8 + G[0];
// else the exponent MSBs are G[4:3] and the leading digit is G[2:0]. The
// eight exponent continuation bits follow, then five declets that expand to
// the remaining fifteen digits. The exponent is returned as q = E - 398.
//
// Purely combinational. The block is the "Decoding Stage" at the top of the
// FMA diagram; its insides follow the IEEE 754-2008 DPD definition.
module dfp_decode
  import dfp_pkg::*;
(
  input  logic [63:0]   operand,
  output dfp_unpacked_t unpacked
);
  logic [4:0] g;
  logic [9:0] ebiased;
  logic [3:0] msd;

  assign g = operand[62:58];

  always_comb begin
    if (g[4:3] == 2'b11) begin
      ebiased = {g[2:1], operand[57:50]};
      msd     = {3'b100, g[0]};
    end else begin
      ebiased = {g[4:3], operand[57:50]};
      msd     = {1'b0, g[2:0]};
    end

    unpacked          = '0;
    unpacked.sign     = operand[63];
    unpacked.payload  = operand[49:0];
    unpacked.is_nan   = (g == 5'b11111);
    unpacked.is_snan  = (g == 5'b11111) && operand[57];
    unpacked.is_inf   = (g == 5'b11110);
    unpacked.exp      = dexp_t'($signed({3'b000, ebiased})) - dexp_t'(EXP_BIAS);
    unpacked.sig[63:60] = msd;
    for (int i = 0; i < 5; i++)
      unpacked.sig[12*i +: 12] = dpd_to_bcd3(operand[10*i +: 10]);
    if (unpacked.is_nan || unpacked.is_inf) begin
      unpacked.sig = '0;
      unpacked.exp = '0;
    end
    unpacked.is_zero = !(unpacked.is_nan || unpacked.is_inf) && (unpacked.sig == '0);
  end
endmodule
