// Reference model for the floating point multiplier testbenches.
//
// fp_mul_ref multiplies two operands of a binary format with E exponent bits
// and F fraction bits (F+1 <= 113, operands right-aligned in 128 bits) the
// textbook way, independently of the RTL's order of operations: it forms the
// exact significand product, normalizes it first, then rounds to nearest with
// ties to even by comparing the discarded remainder against one half, and
// renormalizes if rounding carried out. Operands with a zero exponent field
// count as zero, results below the normal range flush to a signed zero,
// results above it become infinity; NaN results are the quiet NaN with a clear
// sign bit and only the top fraction bit set.
// The events seen while computing the result are reported in ev, so that a
// testbench can count how often each path of the hardware was exercised.
package fp_ref_pkg;

  typedef struct {
    bit special;     // zero / infinity / NaN operand rule applied
    bit norm_shift;  // significand product was in [2, 4)
    bit inexact;     // non-zero remainder discarded
    bit round_up;    // ULP added
    bit tie;         // remainder exactly one half
    bit carry_out;   // rounding carried into a new top bit
    bit overflow;    // result became infinity by exponent overflow
    bit underflow;   // result flushed to zero by exponent underflow
  } fp_events_t;

  function automatic logic [127:0] fp_mul_ref(int E, int F, logic [127:0] x,
                                              logic [127:0] y,
                                              output fp_events_t ev);
    int            bias = (1 << (E - 1)) - 1;
    int            emax = (1 << E) - 1;
    int            M    = F + 1;
    logic [127:0]  fmask = (128'd1 << F) - 1;
    logic          sx = x[E+F], sy = y[E+F], s;
    int            ex = int'((x >> F) & emax);
    int            ey = int'((y >> F) & emax);
    logic [127:0]  fx = x & fmask, fy = y & fmask;
    logic [255:0]  prod, q, rem, half;
    int            e, sh;
    logic [127:0]  r;
    bit            xz, yz, xi, yi, xn, yn;

    ev = '{default: 0};
    s  = sx ^ sy;
    xz = (ex == 0);      yz = (ey == 0);
    xi = (ex == emax) && (fx == 0);
    yi = (ey == emax) && (fy == 0);
    xn = (ex == emax) && (fx != 0);
    yn = (ey == emax) && (fy != 0);

    if (xn || yn || (xi && yz) || (yi && xz)) begin
      ev.special = 1;
      return (128'((1 << E) - 1) << F) | (128'd1 << (F - 1));
    end
    if (xi || yi) begin
      ev.special = 1;
      return (128'(s) << (E + F)) | (128'((1 << E) - 1) << F);
    end
    if (xz || yz) begin
      ev.special = 1;
      return 128'(s) << (E + F);
    end

    prod = 256'(fx | (128'd1 << F)) * 256'(fy | (128'd1 << F));
    e    = ex + ey - bias;
    if (prod[2*M-1]) begin
      ev.norm_shift = 1;
      e  = e + 1;
      sh = M;
    end else begin
      sh = M - 1;
    end
    q    = prod >> sh;
    rem  = prod & ((256'd1 << sh) - 1);
    half = 256'd1 << (sh - 1);
    ev.inexact = (rem != 0);
    ev.tie     = (rem == half);
    if (rem > half || (rem == half && q[0])) begin
      ev.round_up = 1;
      q = q + 1;
    end
    if (q == (256'd1 << M)) begin
      ev.carry_out = 1;
      q = q >> 1;
      e = e + 1;
    end

    if (e >= emax) begin
      ev.overflow = 1;
      r = (128'(s) << (E + F)) | (128'((1 << E) - 1) << F);
    end else if (e <= 0) begin
      ev.underflow = 1;
      r = 128'(s) << (E + F);
    end else begin
      r = (128'(s) << (E + F)) | (128'(e) << F) | (128'(q) & fmask);
    end
    return r;
  endfunction

  // Random 128-bit word.
  function automatic logic [127:0] rand128();
    return {$urandom, $urandom, $urandom, $urandom};
  endfunction

  // Random operand of the format, from a mix of cases: mostly exponents near
  // the bias, sometimes anywhere, sometimes special values or a fraction of
  // all ones, one half or zero.
  function automatic logic [127:0] rand_operand(int E, int F);
    int           bias  = (1 << (E - 1)) - 1;
    int           emax  = (1 << E) - 1;
    logic [127:0] fmask = (128'd1 << F) - 1;
    logic [127:0] f = rand128() & fmask;
    logic         s = 1'($urandom);
    int           e;
    int unsigned  sel = $urandom % 100;
    if (sel < 70)      e = bias - (bias / 2) + int'($urandom % unsigned'(bias));
    else if (sel < 88) e = 1 + int'($urandom % unsigned'(emax - 1));
    else if (sel < 91) e = 0;
    else if (sel < 94) e = emax;
    else               e = bias + int'($urandom % 8) - 4;
    if (sel >= 94 && sel < 96) f = fmask;
    else if (sel >= 96 && sel < 98) f = 128'd1 << (F - 1);
    else if (sel >= 98) f = '0;
    return (128'(s) << (E + F)) | (128'(e) << F) | f;
  endfunction

  // An operand y chosen so that x*y lies just below a power of two: rounding
  // then often carries into a new top bit. Exponent near the bias.
  function automatic logic [127:0] near_recip(int E, int F, logic [127:0] x);
    int           bias  = (1 << (E - 1)) - 1;
    int           M     = F + 1;
    logic [127:0] fmask = (128'd1 << F) - 1;
    logic [255:0] sx = 256'((x & fmask) | (128'd1 << F));
    logic [255:0] sy = ((256'd1 << (2 * M - 1)) - 1) / sx;
    if (sy < (256'd1 << F)) sy = (256'd1 << F);
    return (128'($urandom & 1) << (E + F)) | (128'(bias + int'($urandom % 4) - 2) << F)
           | (128'(sy) & fmask);
  endfunction

endpackage
