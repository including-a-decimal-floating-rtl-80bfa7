// dfp_fma - Decimal64 fused multiply-add, the arithmetic core of the DFPU.
//
// Computes (A x B) + C, (A x B) - C, A x B, A + C or A - C on DPD-encoded
// Decimal64 operands with a single rounding to 16 digits, following the
// IEEE 754-2008 rules: preferred exponent min(Q(A)+Q(B), Q(C)), seven
// rounding modes (the five of the standard plus ties-toward-zero and
// away-from-zero), NaN and infinity handling, overflow, gradual underflow and
// exponent clamping. For ADD/SUB the multiplier operand B is replaced inside
// the unit by +1E0, for MUL the addend is a zero of the product's sign and
// exponent, so one datapath serves all five operations.
//
// Pipeline (latency 4 clocks from in_valid to out_valid, one operation per
// clock, everything advances only while en = 1):
//   input registers  operands, operation, rounding mode, tag
//   stage 1          decoding of the three operands, BCD multiplier (16x16
//                    digits into a 32-digit product) and, in parallel, the
//                    addend preparation: which operand is the left (larger
//                    exponent) one, its left shift k <= 34 digits and the
//                    right shift of the other; special values and the
//                    invalid-operation checks
//   stage 2          alignment into a 68-digit window (digits shifted out on
//                    the right collapse into one sticky digit), BCD add or
//                    subtract (both A-B and B-A, the positive one is kept),
//                    leading-digit count and the final right-shift amount
//   stage 3          right shift to 16 digits, rounding (round digit and
//                    sticky), increment, exponent, overflow/underflow,
//                    special results, encoding, flags
// The three-stage split (multiplier tree with addend preparation / alignment
// and leading-zero logic / combined add-round) follows the three-stage FMA
// organisation. The arithmetic inside each stage is a plain BCD ripple
// design of this implementation, not a decimal carry-save tree with a
// leading-zero anticipator; the results are the same, the delays are not.
//
// Flags are packed as {dz, nx, nv, of, uf}; dz is always 0 (no division).
// Tininess is detected on the exact result before rounding and underflow is
// only flagged when the result is also inexact. 0 x inf + qNaN raises
// invalid. A NaN result carries the payload of the first signalling NaN among A, B,
// C, or failing that of the first quiet NaN.
module dfp_fma
  import dfp_pkg::*;
#(
  parameter int TAG_W = 8               // width of the tag carried alongside
)(
  input  logic             clk,
  input  logic             rst_n,
  input  logic             en,          // pipeline clock enable
  input  logic             in_valid,
  input  dfp_op_e          in_op,
  input  dfp_rnd_e         in_rnd,
  input  logic [63:0]      in_a,
  input  logic [63:0]      in_b,
  input  logic [63:0]      in_c,
  input  logic [TAG_W-1:0] in_tag,
  output logic             out_valid,
  output logic [63:0]      out_result,
  output dfp_flags_t       out_flags,
  output logic [TAG_W-1:0] out_tag
);

  localparam int WB = 4 * WIN;          // window width in bits

  // ------------------------------------------------------------------
  // Input registers
  // ------------------------------------------------------------------
  typedef struct packed {
    logic             valid;
    dfp_op_e          op;
    dfp_rnd_e         rnd;
    logic [63:0]      a, b, c;
    logic [TAG_W-1:0] tag;
  } s0_t;

  s0_t s0;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)  s0 <= '0;
    else if (en) s0 <= '{valid: in_valid, op: in_op, rnd: in_rnd,
                         a: in_a, b: in_b, c: in_c, tag: in_tag};
  end

  // ------------------------------------------------------------------
  // Stage 1: decode, multiply, addend preparation, special cases
  // ------------------------------------------------------------------
  dfp_unpacked_t ua, ub_raw, uc_raw, ub, uc;

  dfp_decode u_dec_a (.operand(s0.a), .unpacked(ua));
  dfp_decode u_dec_b (.operand(s0.b), .unpacked(ub_raw));
  dfp_decode u_dec_c (.operand(s0.c), .unpacked(uc_raw));

  typedef struct packed {
    logic             valid;
    dfp_rnd_e         rnd;
    logic [TAG_W-1:0] tag;
    logic [127:0]     left;       // operand with the larger exponent (32 digits)
    logic [127:0]     right;      // the other operand (32 digits)
    logic             sign_l;
    logic             sign_r;
    logic             eff_sub;
    logic [5:0]       k;          // left shift of 'left' (digits)
    logic [5:0]       rs;         // right shift of 'right' (digits)
    dexp_t            ex;         // exponent of window digit 0
    dexp_t            pref;       // preferred exponent of an exact result
    dfp_res_kind_e    kind;       // special result, or finite
    logic             spec_sign;
    logic [49:0]      payload;
    logic             nv;
  } s1_t;

  s1_t s1_d, s1;

  // BCD multiplier: multiples 0..9 of A, then one shifted multiple per digit of B
  function automatic logic [WB-1:0] bcd_mul16(input logic [63:0] a, input logic [63:0] b);
    logic [WB-1:0] mult [10];
    logic [WB-1:0] acc;
    mult[0] = '0;
    for (int j = 1; j < 10; j++)
      mult[j] = bcd_add(mult[j-1], WB'(a), 1'b0)[WB-1:0];
    acc = '0;
    for (int i = 0; i < 16; i++)
      acc = bcd_add(acc, mult[b[4*i +: 4]] << (4*i), 1'b0)[WB-1:0];
    return acc;
  endfunction

  always_comb begin
    logic            is_addsub, is_mul, neg_c;
    logic            sign_p, sign_c;
    dexp_t           exp_p, exp_c, d;
    logic [WB-1:0]   prod;
    logic            p_zero, c_zero, case_a;
    logic            nan_any, snan_any, inv_mul, inv_add, prod_inf;
    dexp_t           kk, rr;
    logic [1:0]      nan_pick;

    is_addsub = (s0.op == DOP_ADD) || (s0.op == DOP_SUB);
    is_mul    = (s0.op == DOP_MUL);
    neg_c     = (s0.op == DOP_SUB) || (s0.op == DOP_FMS);

    // B is +1E0 for ADD/SUB
    ub = ub_raw;
    if (is_addsub) begin
      ub      = '0;
      ub.sig  = 64'd1;
    end
    sign_p = ua.sign ^ ub.sign;
    exp_p  = ua.exp + ub.exp;

    // C is a zero with the product's sign and exponent for MUL
    uc = uc_raw;
    if (is_mul) begin
      uc         = '0;
      uc.sign    = sign_p;
      uc.exp     = exp_p;
      uc.is_zero = 1'b1;
    end
    sign_c = uc.sign ^ (neg_c && !is_mul);
    exp_c  = uc.exp;

    prod   = bcd_mul16(ua.sig, ub.sig);
    p_zero = ua.is_zero || ub.is_zero;
    c_zero = uc.is_zero;

    // Which operand is on the left and by how much it moves
    if (c_zero) begin
      case_a = 1'b0; d = (exp_p > exp_c) ? exp_p - exp_c : '0;
    end else if (p_zero) begin
      case_a = 1'b1; d = (exp_c > exp_p) ? exp_c - exp_p : '0;
    end else if (exp_c >= exp_p) begin
      case_a = 1'b1; d = exp_c - exp_p;
    end else begin
      case_a = 1'b0; d = exp_p - exp_c;
    end
    kk = (d > dexp_t'(ALIGN_MAX)) ? dexp_t'(ALIGN_MAX) : d;
    rr = ((d - kk) > dexp_t'(33)) ? dexp_t'(33) : d - kk;

    s1_d         = '0;
    s1_d.valid   = s0.valid;
    s1_d.rnd     = s0.rnd;
    s1_d.tag     = s0.tag;
    s1_d.eff_sub = sign_p ^ sign_c;
    s1_d.k       = 6'(kk);
    s1_d.rs      = 6'(rr);
    s1_d.pref    = (exp_p < exp_c) ? exp_p : exp_c;
    if (case_a) begin
      s1_d.left   = {64'd0, uc.sig};
      s1_d.right  = prod[127:0];
      s1_d.sign_l = sign_c;
      s1_d.sign_r = sign_p;
      s1_d.ex     = exp_c - kk - dexp_t'(1);
    end else begin
      s1_d.left   = prod[127:0];
      s1_d.right  = {64'd0, uc.sig};
      s1_d.sign_l = sign_p;
      s1_d.sign_r = sign_c;
      s1_d.ex     = exp_p - kk - dexp_t'(1);
    end

    // Special values
    nan_any  = ua.is_nan || ub.is_nan || uc.is_nan;
    snan_any = ua.is_snan || ub.is_snan || uc.is_snan;
    // a signalling NaN takes precedence over a quiet one, then A, B, C order
    nan_pick = snan_any ? (ua.is_snan ? 2'd0 : ub.is_snan ? 2'd1 : 2'd2)
                        : (ua.is_nan  ? 2'd0 : ub.is_nan  ? 2'd1 : 2'd2);
    inv_mul  = (ua.is_inf && ub.is_zero) || (ua.is_zero && ub.is_inf);
    prod_inf = (ua.is_inf || ub.is_inf) && !inv_mul && !nan_any;
    inv_add  = prod_inf && uc.is_inf && (sign_p != sign_c);
    s1_d.nv  = snan_any || inv_mul || inv_add;
    s1_d.kind = RES_FINITE;
    if (nan_any) begin
      s1_d.kind      = RES_QNAN;
      s1_d.spec_sign = (nan_pick == 2'd0) ? ua.sign : (nan_pick == 2'd1) ? ub.sign : uc.sign;
      s1_d.payload   = (nan_pick == 2'd0) ? ua.payload :
                       (nan_pick == 2'd1) ? ub.payload : uc.payload;
    end else if (inv_mul || inv_add) begin
      s1_d.kind      = RES_QNAN;
      s1_d.spec_sign = 1'b0;
      s1_d.payload   = '0;
    end else if (prod_inf) begin
      s1_d.kind      = RES_INF;
      s1_d.spec_sign = sign_p;
    end else if (uc.is_inf) begin
      s1_d.kind      = RES_INF;
      s1_d.spec_sign = sign_c;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)  s1 <= '0;
    else if (en) s1 <= s1_d;
  end

  // ------------------------------------------------------------------
  // Stage 2: align, add/subtract, leading digit, shift amount
  // ------------------------------------------------------------------
  typedef struct packed {
    logic             valid;
    dfp_rnd_e         rnd;
    logic [TAG_W-1:0] tag;
    logic [WB-1:0]    x;          // exact magnitude (with sticky digit)
    logic             sign;
    logic             eff_sub;
    logic             sign_l;
    logic [7:0]       nd;         // significant digits of x
    logic [7:0]       s;          // right shift to the result (capped)
    dexp_t            q;          // exponent of the result before rounding carry
    dexp_t            ex;
    dexp_t            pref;
    dfp_res_kind_e    kind;
    logic             spec_sign;
    logic [49:0]      payload;
    logic             nv;
  } s2_t;

  s2_t s2_d, s2;

  always_comb begin
    logic [WB-1:0]  lw, rw, r_sh;
    logic [127:0]   r_mask;
    logic           r_sticky;
    logic [WB:0]    t_lr, t_rl;
    dexp_t          s_min;

    lw       = WB'(s1.left) << (4 * (int'(s1.k) + 1));
    r_sh     = WB'(s1.right >> (4 * int'(s1.rs)));
    r_mask   = (128'd1 << (4 * int'(s1.rs))) - 128'd1;
    r_sticky = |(s1.right & r_mask);
    rw       = {r_sh[WB-5:0], 3'b000, r_sticky};

    s2_d         = '0;
    s2_d.valid   = s1.valid;
    s2_d.rnd     = s1.rnd;
    s2_d.tag     = s1.tag;
    s2_d.eff_sub = s1.eff_sub;
    s2_d.sign_l  = s1.sign_l;
    s2_d.ex      = s1.ex;
    s2_d.pref    = s1.pref;
    s2_d.kind    = s1.kind;
    s2_d.spec_sign = s1.spec_sign;
    s2_d.payload = s1.payload;
    s2_d.nv      = s1.nv;

    t_lr = bcd_add(lw, bcd_nines(rw), 1'b1);   // lw - rw, carry = no borrow
    t_rl = bcd_add(rw, bcd_nines(lw), 1'b1);   // rw - lw
    if (!s1.eff_sub) begin
      s2_d.x    = bcd_add(lw, rw, 1'b0)[WB-1:0];
      s2_d.sign = s1.sign_l;
    end else if (t_lr[WB]) begin
      s2_d.x    = t_lr[WB-1:0];
      s2_d.sign = s1.sign_l;
    end else begin
      s2_d.x    = t_rl[WB-1:0];
      s2_d.sign = s1.sign_r;
    end

    s2_d.nd = bcd_ndigits(s2_d.x);
    // shift right by at least one digit (the sticky digit), enough to keep
    // 16 digits, and enough to bring the exponent up to Q_MIN
    s_min = dexp_t'(Q_MIN) - s1.ex;
    s2_d.s = 8'd1;
    if (s2_d.nd > 8'd17) s2_d.s = s2_d.nd - 8'd16;
    s2_d.q = s1.ex + dexp_t'(s2_d.s);
    if (s_min > dexp_t'(s2_d.s)) begin
      s2_d.q = dexp_t'(Q_MIN);
      s2_d.s = (s_min > dexp_t'(WIN + 1)) ? 8'(WIN + 1) : 8'(s_min);
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)  s2 <= '0;
    else if (en) s2 <= s2_d;
  end

  // ------------------------------------------------------------------
  // Stage 3: round, exponent, exceptions, encode
  // ------------------------------------------------------------------
  logic [63:0]   res_sig;
  dexp_t         res_exp;
  logic          res_sign;
  dfp_res_kind_e res_kind;
  dfp_flags_t    res_flags;
  logic [63:0]   res_word;

  always_comb begin
    logic [WB+7:0]  xw, sh, mask;
    logic [3:0]     rdig;
    logic           sticky, inexact, inc, tiny, ovf;
    logic [WB:0]    rounded;
    logic [63:0]    kept;
    logic [7:0]     nd16;
    dexp_t          q;
    int             fold;

    nd16    = 8'd0;
    fold    = 0;
    xw      = {8'd0, s2.x};
    sh      = xw >> (4 * int'(s2.s));
    kept    = sh[63:0];
    rdig    = 4'((xw >> (4 * (int'(s2.s) - 1))) & 'hF);
    mask    = ({{(WB+7){1'b0}}, 1'b1} << (4 * (int'(s2.s) - 1))) - 1'b1;
    sticky  = |(xw & mask);
    inexact = (rdig != 4'd0) || sticky;

    unique case (s2.rnd)
      RND_RNE: inc = (rdig > 4'd5) || ((rdig == 4'd5) && (sticky || kept[0]));
      RND_RNA: inc = (rdig >= 4'd5);
      RND_RNZ: inc = (rdig > 4'd5) || ((rdig == 4'd5) && sticky);
      RND_RZ:  inc = 1'b0;
      RND_RA:  inc = inexact;
      RND_RP:  inc = inexact && !s2.sign;
      RND_RM:  inc = inexact && s2.sign;
      default: inc = 1'b0;
    endcase

    rounded = bcd_add(WB'(kept), '0, inc);
    q       = s2.q;
    if (rounded[67:64] != 4'd0) begin           // 9999999999999999 + 1
      res_sig = 64'h1000_0000_0000_0000;
      q       = q + dexp_t'(1);
    end else begin
      res_sig = rounded[63:0];
    end

    tiny = (s2.x != '0) && ((s2.ex + dexp_t'(s2.nd) - dexp_t'(1)) < dexp_t'(E_MIN));

    res_flags    = '0;
    res_flags.nv = s2.nv;
    res_kind     = s2.kind;
    res_sign     = (s2.kind == RES_FINITE) ? s2.sign : s2.spec_sign;
    res_exp      = q;
    ovf          = 1'b0;

    if (s2.kind == RES_FINITE) begin
      if (s2.x == '0) begin
        // exact zero: preferred exponent, sign by the rules for x + (-x)
        res_sig  = '0;
        res_exp  = (s2.pref < dexp_t'(Q_MIN)) ? dexp_t'(Q_MIN) :
                   (s2.pref > dexp_t'(Q_MAX)) ? dexp_t'(Q_MAX) : s2.pref;
        res_sign = s2.eff_sub ? (s2.rnd == RND_RM) : s2.sign_l;
      end else begin
        res_flags.nx = inexact;
        res_flags.uf = tiny && inexact;
        if (q > dexp_t'(Q_MAX)) begin
          nd16 = 8'd0;
          for (int i = 0; i < 16; i++)
            if (res_sig[4*i +: 4] != 4'd0) nd16 = 8'(i + 1);
          fold = int'(q) - Q_MAX;
          if (int'(nd16) + fold <= 16) begin  // clamp: pad with zeros
            res_sig = res_sig << (4 * fold);
            res_exp = dexp_t'(Q_MAX);
          end else begin
            ovf = 1'b1;
          end
        end
        if (ovf) begin
          res_flags.of = 1'b1;
          res_flags.nx = 1'b1;
          if ((s2.rnd == RND_RZ) ||
              (s2.rnd == RND_RP && s2.sign) ||
              (s2.rnd == RND_RM && !s2.sign)) begin
            res_sig = 64'h9999_9999_9999_9999;
            res_exp = dexp_t'(Q_MAX);
          end else begin
            res_kind = RES_INF;
          end
        end
      end
    end
  end

  dfp_encode u_enc (
    .kind    (res_kind),
    .sign    (res_sign),
    .exp     (res_exp),
    .sig     (res_sig),
    .payload (s2.payload),
    .result  (res_word)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid  <= 1'b0;
      out_result <= '0;
      out_flags  <= '0;
      out_tag    <= '0;
    end else if (en) begin
      out_valid  <= s2.valid;
      out_result <= res_word;
      out_flags  <= res_flags;
      out_tag    <= s2.tag;
    end
  end

endmodule
