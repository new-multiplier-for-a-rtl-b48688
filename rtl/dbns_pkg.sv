// dbns_pkg: types and elaboration-time constants shared by the hybrid
// DBNS x floating-point multiplier and the flash-ADC / FIR design around it.
//
// Number formats
//   fp32_t  : IEEE-754 single precision filter coefficient {sign, biased
//             exponent B, 23-bit fraction f}; its value is (1+f)*2^(B-127).
//             An exponent field of 0 is read as zero (subnormals flushed).
//   dbns_t  : a single-term double-base sample 2^b * 3^t with 8-bit two's
//             complement exponents b and t, plus a zero flag (the ADC level
//             0 has no single-term representation).
//
// Piecewise-constant log approximation
//   log2(1+f) - f rises from 0 at f=0 to its maximum D_MAX (0.086) near
//   f=0.4427 and falls back to 0 at f=1.  The error range [0, D_MAX] is cut
//   into N_PART bands of width d0 = D_MAX/N_PART.  Each band boundary k*d0
//   (k = 1..N_PART-1) is crossed once on the rising and once on the falling
//   side, so there are 2*(N_PART-1) comparator thresholds y_j on f.  In band
//   k the deviation constant d = k*d0 (the band's lower edge) is added to f,
//   so f + d never exceeds log2(1+f) and the error is below d0.
//   The same bands mapped through x = log2(1+f) give the thresholds used to
//   revert an exponent fraction x back to a linear mantissa:
//   2^x ~= 1 + x - d.  All thresholds are computed here by bisection, in
//   real arithmetic, while the design elaborates; nothing is computed in
//   hardware.
//
// DBNE table
//   For ADC level X (1 .. 2^ADC_BITS-1) the encoder uses the pair (b,t) with
//   the smallest |t| (t >= 0 first) for which |X - 2^b 3^t| < DBNE_EPS LSB,
//   b = round(log2 X - t log2 3).  With DBNE_EPS = 0.5 every 6-bit level
//   is reached with |t| <= 20 and -26 <= b <= 37.
package dbns_pkg;

  localparam int MANT_W = 23;  // IEEE-754 single-precision fraction width
  localparam int EXP_W = 8;  // width of B, b and t

  typedef struct packed {
    logic             sign;
    logic [EXP_W-1:0] exp;
    logic [MANT_W-1:0] frac;
  } fp32_t;

  typedef struct packed {
    logic                    zero;
    logic signed [EXP_W-1:0] b;
    logic signed [EXP_W-1:0] t;
  } dbns_t;

  localparam real LN2 = 0.6931471805599453;
  localparam real LOG2_3 = 1.5849625007211563;
  localparam real FRAC_SCALE = 8388608.0;  // 2^23

  function automatic real log2r(real x);
    return $ln(x) / LN2;
  endfunction

  // log2(1+f) - f
  function automatic real log_err(real f);
    return log2r(1.0 + f) - f;
  endfunction

  // Point f where log_err(f) = level, on the rising (f below the peak) or
  // falling side.
  function automatic real log_cross(real level, bit rising);
    real lo, hi, mid;
    if (rising) begin
      lo = 0.0;
      hi = 1.0 / LN2 - 1.0;
    end else begin
      lo = 1.0 / LN2 - 1.0;
      hi = 1.0;
    end
    for (int i = 0; i < 60; i++) begin
      mid = (lo + hi) / 2.0;
      if ((log_err(mid) < level) == rising) lo = mid;
      else hi = mid;
    end
    return lo;
  endfunction

  // Band edge level of threshold j (0 .. 2*n_part-3, ascending in f).
  function automatic int thr_band(int n_part, int j);
    return (j < n_part - 1) ? j + 1 : 2 * n_part - 2 - j;
  endfunction

  function automatic real thr_real(int n_part, real d_max, int j);
    return log_cross(d_max * real'(thr_band(n_part, j)) / real'(n_part), j < n_part - 1);
  endfunction

  // Comparator constant y_j on the 23-bit mantissa fraction f.
  function automatic logic [MANT_W-1:0] log_threshold(int n_part, real d_max, int j);
    return MANT_W'($rtoi(thr_real(n_part, d_max, j) * FRAC_SCALE + 0.5));
  endfunction

  // Threshold on an exponent fraction x = log2(1+f) used when reverting.
  function automatic logic [MANT_W-1:0] lin_threshold(int n_part, real d_max, int j);
    real y;
    y = thr_real(n_part, d_max, j);
    return MANT_W'($rtoi(log2r(1.0 + y) * FRAC_SCALE + 0.5));
  endfunction

  // Deviation constant of band k: k * D_MAX / N_PART in 23-bit fraction units.
  function automatic logic [MANT_W-1:0] band_d(int n_part, real d_max, int k);
    return MANT_W'($rtoi(d_max * real'(k) / real'(n_part) * FRAC_SCALE + 0.5));
  endfunction

  // Band index from the number of thresholds at or below the operand.
  function automatic int band_of_count(int n_part, int count);
    return (count <= n_part - 1) ? count : 2 * n_part - 2 - count;
  endfunction

  // DBNE search: returns {b, t} for ADC level x.
  function automatic logic [2*EXP_W-1:0] dbne_pair(int x, int t_max, real eps);
    int b, t;
    logic signed [EXP_W-1:0] best_b, best_t;
    real err, best_err;
    best_b = 0;
    best_t = 0;
    best_err = 1.0e30;
    for (int a = 0; a <= t_max; a++) begin
      for (int s = 0; s < 2; s++) begin
        t = (s == 0) ? a : -a;
        if (a == 0 && s == 1) continue;
        b = $rtoi($floor(log2r(real'(x)) - real'(t) * LOG2_3 + 0.5));
        if (b < -(2 ** (EXP_W - 1)) || b > 2 ** (EXP_W - 1) - 1) continue;
        err = real'(x) - (2.0 ** real'(b)) * (3.0 ** real'(t));
        if (err < 0.0) err = -err;
        if (err < best_err) begin
          best_err = err;
          best_b = EXP_W'(b);
          best_t = EXP_W'(t);
        end
        if (err < eps) return {EXP_W'(b), EXP_W'(t)};
      end
    end
    return {best_b, best_t};
  endfunction

endpackage
