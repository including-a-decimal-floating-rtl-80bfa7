// dfp_pkg - types, constants and helper functions shared by the decimal
// floating point unit (DFPU) and the FGU control logic around it.
//
// Decimal64 layout (IEEE 754-2008, DPD encoding): bit 63 sign, bits 62:50 the
// 13-bit combination field (5 leading bits carrying the two exponent MSBs and
// the leading significand digit, then 8 exponent continuation bits), bits
// 49:0 five 10-bit declets of three digits each. Precision 16 digits, bias
// 398, so the exponent q of the least significant digit lies in -398..369.
//
// Significands are held as packed BCD, four bits per digit, digit 0 in the
// least significant nibble. The helper functions are the DPD<->BCD declet
// translations and a ripple BCD adder used by the multiplier, the aligner and
// the rounding incrementer of the fused multiply-add.
package dfp_pkg;

  // ---------------------------------------------------------------------
  // Format constants (Decimal64)
  // ---------------------------------------------------------------------
  localparam int P_DIGITS = 16;        // precision p
  localparam int EXP_BIAS = 398;
  localparam int Q_MIN    = -398;      // exponent of the LSD, subnormal limit
  localparam int Q_MAX    = 369;       // 384 - (p - 1)
  localparam int E_MIN    = -383;      // smallest normal adjusted exponent

  // Working window of the FMA datapath in digits. It holds the larger
  // operand (up to 2p digits) shifted left by up to ALIGN_MAX+1 digits.
  localparam int ALIGN_MAX = 34;
  localparam int WIN       = 68;       // 2p + ALIGN_MAX + 2

  typedef logic signed [12:0] dexp_t;  // unbiased exponent, wide enough for sums

  // ---------------------------------------------------------------------
  // Decimal operation code sent from the FAC to the DFPU (dec_operation)
  // Table 4.9 codes: FMA 0X0, FMS 0X1, MUL 10X, ADD 110, SUB 111.
  // ---------------------------------------------------------------------
  typedef enum logic [2:0] {
    DOP_FMA = 3'b000,
    DOP_FMS = 3'b001,
    DOP_MUL = 3'b100,
    DOP_ADD = 3'b110,
    DOP_SUB = 3'b111
  } dfp_op_e;

  // DFSR.round encodings (DFSR bits 7:5)
  typedef enum logic [2:0] {
    RND_RNE = 3'b000,   // nearest, ties to even
    RND_RA  = 3'b001,   // away from zero
    RND_RP  = 3'b010,   // toward +infinity
    RND_RM  = 3'b011,   // toward -infinity
    RND_RZ  = 3'b100,   // toward zero
    RND_RNA = 3'b101,   // nearest, ties away from zero
    RND_RNZ = 3'b110    // nearest, ties toward zero
  } dfp_rnd_e;

  // DFSR.flags, bit 4..0 = dz nx nv of uf
  typedef struct packed {
    logic dz;
    logic nx;
    logic nv;
    logic of;
    logic uf;
  } dfp_flags_t;

  // Operand after the decoding stage
  typedef struct packed {
    logic               sign;
    dexp_t              exp;        // unbiased exponent q
    logic [4*16-1:0]    sig;        // 16 BCD digits
    logic               is_zero;    // finite with zero significand
    logic               is_inf;
    logic               is_nan;
    logic               is_snan;
    logic [49:0]        payload;    // trailing significand field (NaN payload)
  } dfp_unpacked_t;

  // Special result kinds chosen by the exception logic
  typedef enum logic [1:0] {
    RES_FINITE = 2'd0,
    RES_INF    = 2'd1,
    RES_QNAN   = 2'd2
  } dfp_res_kind_e;

  // ---------------------------------------------------------------------
  // DPD declet (10 bits) to three BCD digits (12 bits)
  // ---------------------------------------------------------------------
  function automatic logic [11:0] dpd_to_bcd3(input logic [9:0] b);
    logic [3:0] d2, d1, d0;
    if (!b[3]) begin
      d2 = {1'b0, b[9:7]}; d1 = {1'b0, b[6:4]}; d0 = {1'b0, b[2:0]};
    end else begin
      unique case (b[2:1])
        2'b00: begin d2 = {1'b0, b[9:7]}; d1 = {1'b0, b[6:4]}; d0 = {3'b100, b[0]}; end
        2'b01: begin d2 = {1'b0, b[9:7]}; d1 = {3'b100, b[4]}; d0 = {1'b0, b[6:5], b[0]}; end
        2'b10: begin d2 = {3'b100, b[7]}; d1 = {1'b0, b[6:4]}; d0 = {1'b0, b[9:8], b[0]}; end
        default: begin
          unique case (b[6:5])
            2'b00: begin d2 = {3'b100, b[7]}; d1 = {3'b100, b[4]}; d0 = {1'b0, b[9:8], b[0]}; end
            2'b01: begin d2 = {3'b100, b[7]}; d1 = {1'b0, b[9:8], b[4]}; d0 = {3'b100, b[0]}; end
            2'b10: begin d2 = {1'b0, b[9:7]}; d1 = {3'b100, b[4]}; d0 = {3'b100, b[0]}; end
            default: begin d2 = {3'b100, b[7]}; d1 = {3'b100, b[4]}; d0 = {3'b100, b[0]}; end
          endcase
        end
      endcase
    end
    return {d2, d1, d0};
  endfunction

  // ---------------------------------------------------------------------
  // Three BCD digits to a canonical DPD declet
  // ---------------------------------------------------------------------
  function automatic logic [9:0] bcd3_to_dpd(input logic [11:0] d);
    logic a, b, c, dd, e, f, g, h, i, j, k, m;
    {a, b, c, dd} = d[11:8];
    {e, f, g, h}  = d[7:4];
    {i, j, k, m}  = d[3:0];
    unique case ({a, e, i})
      3'b000: return {b, c, dd, f, g, h, 1'b0, j, k, m};
      3'b001: return {b, c, dd, f, g, h, 1'b1, 1'b0, 1'b0, m};
      3'b010: return {b, c, dd, j, k, h, 1'b1, 1'b0, 1'b1, m};
      3'b100: return {j, k, dd, f, g, h, 1'b1, 1'b1, 1'b0, m};
      3'b110: return {j, k, dd, 1'b0, 1'b0, h, 1'b1, 1'b1, 1'b1, m};
      3'b101: return {f, g, dd, 1'b0, 1'b1, h, 1'b1, 1'b1, 1'b1, m};
      3'b011: return {b, c, dd, 1'b1, 1'b0, h, 1'b1, 1'b1, 1'b1, m};
      default: return {1'b0, 1'b0, dd, 1'b1, 1'b1, h, 1'b1, 1'b1, 1'b1, m};
    endcase
  endfunction

  // ---------------------------------------------------------------------
  // Ripple BCD adder over the full working window: a + b + cin.
  // Returns the WIN-digit sum; the decimal carry out is bit 4*WIN.
  // ---------------------------------------------------------------------
  function automatic logic [4*WIN:0] bcd_add(input logic [4*WIN-1:0] a,
                                             input logic [4*WIN-1:0] b,
                                             input logic             cin);
    logic [4*WIN:0] r;
    logic           c;
    logic [4:0]     s;
    c = cin;
    for (int n = 0; n < WIN; n++) begin
      s = {1'b0, a[4*n +: 4]} + {1'b0, b[4*n +: 4]} + {4'd0, c};
      if (s > 5'd9) begin
        s = s + 5'd6;
        c = 1'b1;
      end else begin
        c = 1'b0;
      end
      r[4*n +: 4] = s[3:0];
    end
    r[4*WIN] = c;
    return r;
  endfunction

  // Nine's complement of every digit of the window
  function automatic logic [4*WIN-1:0] bcd_nines(input logic [4*WIN-1:0] a);
    logic [4*WIN-1:0] r;
    for (int n = 0; n < WIN; n++) r[4*n +: 4] = 4'd9 - a[4*n +: 4];
    return r;
  endfunction

  // Number of significant digits of a window value (0 for zero)
  function automatic logic [7:0] bcd_ndigits(input logic [4*WIN-1:0] a);
    logic [7:0] n;
    n = '0;
    for (int i = 0; i < WIN; i++)
      if (a[4*i +: 4] != 4'd0) n = 8'(i + 1);
    return n;
  endfunction

endpackage
