// ldpc_pkg - shared types, constants and helper functions of the layered
// sum-product QC-LDPC decoder.
//
// Every soft value (channel LLR, posterior LLR, check-to-variable message)
// uses one uniform fixed-point format (1,5,13): a 19-bit two's-complement word
// with 13 fraction bits, as in the source design. Values saturate symmetrically
// to +/-(2^18-1) LSB so that the magnitude always fits in 18 bits, the width
// the Psi unit takes. The symmetric saturation is this design's own choice.
//
// The package also holds the coefficient table of the piecewise quadratic
// approximation of Psi(x) = -ln(tanh(|x|/2)). The source design fits
// y = a*x^2 + b*x + c on non-uniform segments but does not publish its segments
// or coefficients. Here the segments are octaves of the 18-bit input
// magnitude m (units of 2^-13): segment e = position of the leading one of m,
// and the local variable u = m / 2^e lies in [1,2). Coefficients are the
// least-squares fit of Psi(u * 2^e * 2^-13) over all m of the segment, scaled:
//   A = round(a * 2^20), BN = round(-b * 2^20), C = round(c * 2^13).
// The evaluated result (see psi_approx) stays within 0.009 of the exact Psi.
package ldpc_pkg;

  localparam int unsigned W    = 19;   // word width 1 + I + F
  localparam int unsigned FRAC = 13;   // fraction bits F
  localparam int unsigned MAGW = W - 1; // magnitude width

  typedef logic signed [W-1:0] llr_t;
  typedef logic [MAGW-1:0]     mag_t;

  localparam llr_t LLR_MAX = llr_t'((1 << MAGW) - 1);
  localparam llr_t LLR_MIN = -LLR_MAX;
  localparam mag_t MAG_MAX = '1;

  // Psi coefficient scaling (see psi_approx)
  localparam int unsigned PSI_FA = 20;
  localparam int unsigned PSI_FB = 20;
  localparam int unsigned PSI_CW = 25;  // DSP 25-bit operand
  typedef logic signed [PSI_CW-1:0] coef_t;
  typedef struct packed {
    coef_t a;   // quadratic coefficient
    coef_t bn;  // negated linear coefficient (the subtractor takes c - bn*u)
    coef_t c;   // constant
  } psi_coef_t;

  // Saturate a wider signed sum into the (1,5,13) range.
  function automatic llr_t sat_llr(input logic signed [W:0] v);
    if (v > (W+1)'(LLR_MAX))      return LLR_MAX;
    else if (v < (W+1)'(LLR_MIN)) return LLR_MIN;
    else                          return llr_t'(v);
  endfunction

  // Magnitude of a saturated word (never overflows because of the symmetric range).
  function automatic mag_t mag_of(input llr_t v);
    llr_t a;
    a = v[W-1] ? -v : v;
    return mag_t'(a);
  endfunction

  // Piecewise quadratic coefficients, one row per octave e = msb(m).
  function automatic psi_coef_t psi_coef(input logic [4:0] e);
    case (e)
      5'd0:  return '{coef_t'(3391815),  coef_t'(-3391815), coef_t'(26499)};
      5'd1:  return '{coef_t'(-1849919), coef_t'(-3774475), coef_t'(58782)};
      5'd2:  return '{coef_t'(289377),   coef_t'(1576418),  coef_t'(78189)};
      5'd3:  return '{coef_t'(266793),   coef_t'(1514368),  coef_t'(72186)};
      5'd4:  return '{coef_t'(255710),   coef_t'(1482326),  coef_t'(66331)};
      5'd5:  return '{coef_t'(250250),   coef_t'(1466155),  coef_t'(60561)};
      5'd6:  return '{coef_t'(247546),   coef_t'(1458046),  coef_t'(54836)};
      5'd7:  return '{coef_t'(246215),   coef_t'(1453987),  coef_t'(49135)};
      5'd8:  return '{coef_t'(245607),   coef_t'(1451956),  coef_t'(43445)};
      5'd9:  return '{coef_t'(245526),   coef_t'(1450939),  coef_t'(37761)};
      5'd10: return '{coef_t'(246366),   coef_t'(1450400),  coef_t'(32079)};
      5'd11: return '{coef_t'(250130),   coef_t'(1449663),  coef_t'(26397)};
      5'd12: return '{coef_t'(262796),   coef_t'(1442521),  coef_t'(20690)};
      5'd13: return '{coef_t'(284070),   coef_t'(1363181),  coef_t'(14697)};
      5'd14: return '{coef_t'(227041),   coef_t'(912757),   coef_t'(7519)};
      5'd15: return '{coef_t'(54881),    coef_t'(195037),   coef_t'(1359)};
      5'd16: return '{coef_t'(1153),     coef_t'(3854),     coef_t'(25)};
      default: return '{coef_t'(0),      coef_t'(1),        coef_t'(0)};
    endcase
  endfunction

  // Decoder-level outcome of one Decision pass.
  typedef enum logic [1:0] {
    DEC_NONE    = 2'd0,
    DEC_PASS    = 2'd1,  // every layer matches its syndrome
    DEC_RETRY   = 2'd2,  // mismatch found, iterate again
    DEC_GIVE_UP = 2'd3   // mismatch and the iteration limit is reached
  } dec_result_t;

endpackage
