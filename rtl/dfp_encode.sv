// dfp_encode - encoding stage of the decimal FMA: packs a result into the
// Decimal64 DPD interchange format.
//
// Inputs are the result kind (finite, infinity, quiet NaN), the sign, the
// unbiased exponent q (the caller guarantees -398 <= q <= 369 for finite
// results), the 16 BCD significand digits and, for NaNs, the 50-bit payload.
// The exponent is biased by 398; the leading digit goes into the combination
// field (digits 8 and 9 use the 11xxx form) and the other fifteen digits are
// compressed into five canonical declets. Infinities are written with a zero
// trailing field and NaNs as quiet NaNs carrying the given payload.
//
// Purely combinational; the "Encoding Stage" at the bottom of the FMA diagram.
module dfp_encode
  import dfp_pkg::*;
(
  input  dfp_res_kind_e kind,
  input  logic          sign,
  input  dexp_t         exp,
  input  logic [63:0]   sig,
  input  logic [49:0]   payload,
  output logic [63:0]   result
);
  logic [9:0] ebiased;
  logic [3:0] msd;
  logic [49:0] trailing;

  always_comb begin
    ebiased = 10'(exp + dexp_t'(EXP_BIAS));
    msd     = sig[63:60];
    for (int i = 0; i < 5; i++)
      trailing[10*i +: 10] = bcd3_to_dpd(sig[12*i +: 12]);
    unique case (kind)
      RES_INF:  result = {sign, 5'b11110, 8'd0, 50'd0};
      RES_QNAN: result = {sign, 5'b11111, 1'b0, 7'd0, payload};
      default: begin
        if (msd[3])
          result = {sign, 2'b11, ebiased[9:8], msd[0], ebiased[7:0], trailing};
        else
          result = {sign, ebiased[9:8], msd[2:0], ebiased[7:0], trailing};
      end
    endcase
  end
endmodule
