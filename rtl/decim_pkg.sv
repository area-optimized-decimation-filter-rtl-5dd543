// decim_pkg: word lengths, filter coefficients and the CSD recoding shared by
// the stages of the 128x sigma-delta decimation filter.
//
// Stage word lengths grow exactly by each comb stage's DC gain (3 -> 7 -> 10
// -> 16 bits), so the comb section never overflows and needs no rounding.
// The halfband and FIR stages work on 16-bit samples with coefficients of
// 15 fractional bits. The stage orders (6, 14 and 36) follow the reference
// design; the coefficient values are this design's own:
//   * halfband: h[n] = 0.5*sinc((n-N/2)/2) * kaiser(n), quantised to Q1.15,
//     centre tap exactly 1/2 and the off-centre taps adjusted so the DC gain
//     is exactly 1 (Kaiser beta 2 for order 6, 4 for order 14);
//   * FIR: 37-tap linear-phase least-squares fit to 1/|comb response| on
//     0..0.2 of its input rate and to 0 on 0.3..0.5 (weight 10), Q1.15.
package decim_pkg;

  localparam int SD_W     = 3;   // modulator output word (Table of specs)
  localparam int NR1_W    = 7;   // after (1+z^-1)^4, gain 16
  localparam int NR2_W    = 10;  // after (1+z^-1)^3, gain 8
  localparam int CIC_W    = 16;  // after sinc3/4, gain 64
  localparam int DATA_W   = 16;  // halfband / FIR sample word
  localparam int DEC_OUT_W = 12;  // final output word
  localparam int COEF_W   = 16;  // signed coefficient word
  localparam int COEF_FRAC = 15; // fractional bits of the coefficients

  // Oversampling ratio of the modulator; selects how many comb stages run.
  typedef enum logic [1:0] {
    OSR128 = 2'd0,  // all three comb stages, total decimation 128
    OSR64  = 2'd1,  // 3rd-order non-recursive stage bypassed, total 64
    OSR32  = 2'd2   // sinc3 stage bypassed, total 32
  } osr_e;

  // Halfband coefficient k (0..order) for order 6 or 14, Q1.15.
  function automatic int hbf_coef(input int order, input int k);
    int d;
    d = (k > order/2) ? k - order/2 : order/2 - k;   // distance from centre
    if (d == 0) return 16384;
    if (order == 6) begin
      case (d)
        1: return 9724;
        3: return -1532;
        default: return 0;
      endcase
    end else begin
      case (d)
        1: return 10055;
        3: return -2497;
        5: return 766;
        7: return -132;
        default: return 0;
      endcase
    end
  endfunction

  // 37-tap FIR coefficient k (0..36), symmetric about k = 18, Q1.15.
  function automatic int fir_coef(input int k);
    int d;
    d = (k > 18) ? k - 18 : 18 - k;
    case (d)
      0:  return 16052;
      1:  return 10355;
      2:  return 334;
      3:  return -3241;
      4:  return -320;
      5:  return 1697;
      6:  return 278;
      7:  return -981;
      8:  return -226;
      9:  return 568;
      10: return 171;
      11: return -313;
      12: return -118;
      13: return 157;
      14: return 74;
      15: return -67;
      16: return -40;
      17: return 20;
      18: return 16;
      default: return 0;
    endcase
  endfunction

  // Canonical signed digit recoding of c: bit i of the result is set where
  // digit i is +1 (want_neg = 0) or -1 (want_neg = 1). No two adjacent digits
  // are non-zero, so a COEF_W-bit constant costs at most COEF_W/2 adders.
  function automatic logic [COEF_W:0] csd_digits(input int c, input bit want_neg);
    logic [COEF_W:0] r;
    int n;
    r = '0;
    n = c;
    for (int i = 0; i <= COEF_W; i++) begin
      if ((n & 1) != 0) begin
        if ((n & 3) == 1) begin
          if (!want_neg) r[i] = 1'b1;
          n = n - 1;
        end else begin
          if (want_neg) r[i] = 1'b1;
          n = n + 1;
        end
      end
      n = n >>> 1;
    end
    return r;
  endfunction

endpackage
