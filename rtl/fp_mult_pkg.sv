// Shared constants of the floating point multiplier family.
//
// Four binary formats are supported: single (SP, 32 bit), double (DP, 64 bit),
// double extended (DEP, 80 bit) and quadruple (QP, 128 bit) precision. Each is
// described by its exponent width E and fraction width F; the significand
// multiplied is M = F+1 bits (hidden leading one). The functions below give the
// pipeline depth of each format's significand multiplier and of the rounding /
// normalization stages that follow it; a multiplier's total latency is their
// sum (5, 9, 10 and 14 cycles for SP, DP, DEP and QP).
//
// The DEP format is taken here as a 64-bit fraction with an implicit leading
// one (a 65-bit significand, handled by a 66x66 multiplier), not as the x87
// format with an explicit integer bit.
package fp_mult_pkg;

  // Exponent and fraction widths of the four formats.
  localparam int SP_E  = 8;   localparam int SP_F  = 23;
  localparam int DP_E  = 11;  localparam int DP_F  = 52;
  localparam int DEP_E = 15;  localparam int DEP_F = 64;
  localparam int QP_E  = 15;  localparam int QP_F  = 112;

  // Class of a product, decided from the operands before any arithmetic.
  typedef enum logic [1:0] {
    CLS_NORMAL = 2'd0,
    CLS_ZERO   = 2'd1,
    CLS_INF    = 2'd2,
    CLS_NAN    = 2'd3
  } fp_class_e;

  // Width of the significand multiplier built for a fraction width F.
  function automatic int mant_width(int f);
    case (f)
      SP_F:    return 24;
      DP_F:    return 53;
      DEP_F:   return 66;
      QP_F:    return 114;
      default: return f + 1;
    endcase
  endfunction

  // Latency of the significand multiplier, in clock cycles.
  function automatic int mant_latency(int f);
    case (f)
      SP_F:    return 3;
      DP_F:    return 6;
      DEP_F:   return 7;
      QP_F:    return 11;
      default: return 0;
    endcase
  endfunction

  // Latency of rounding, normalization and final processing.
  function automatic int post_latency(int f);
    return (f == SP_F) ? 2 : 3;
  endfunction

endpackage
