// Shared constants and helpers for the two-stage pipelined 1-D DWT.
//
// The default configuration is the worked example of the architecture: a
// 128-point input (N = 128), all J = 7 decomposition levels, the 6-tap
// Daubechies filter (L = 6) and 8-bit samples and coefficients.  The
// coefficient values themselves, their Q1.7 fixed-point format and the
// rounding of stored lowpass samples are this design's own choices.
package dwt_pkg;

  localparam int unsigned N_DEF  = 128; // input length N = 2^J
  localparam int unsigned J_DEF  = 7;   // decomposition levels
  localparam int unsigned L_DEF  = 6;   // filter taps
  localparam int unsigned SW_DEF = 8;   // sample word length (bits)
  localparam int unsigned CW_DEF = 8;   // coefficient word length (bits)
  localparam int unsigned FRAC_DEF = 7; // fractional bits of a coefficient

  // Width of a full-precision filter output: sum of L products of SW x CW bits.
  function automatic int unsigned out_width(int unsigned sw, int unsigned cw, int unsigned l);
    return sw + cw + $clog2(l);
  endfunction

  // n_c of eq. (7): number of level >= 2 samples that depend on the last
  // level-1 sample, i.e. the lower bound of the tail t_c in slots.
  function automatic int unsigned calc_nc(int unsigned l, int unsigned j);
    int unsigned lg, s, num, den;
    lg = $clog2(l);
    s  = l / 2;
    for (int unsigned jj = 3; jj + lg <= j; jj++) begin
      den = 1 << (jj - 2);
      num = l / 2 + ((1 << (jj - 2)) - 1) * l + 1 - 3 * (1 << (jj - 3));
      s   = s + (num + den - 1) / den;
    end
    return s + (1 << lg) - 1;
  endfunction

  // Daubechies 6-tap lowpass filter h0..h5 in Q1.7 (round(h * 128)).
  localparam logic signed [7:0] DB6_Q7 [6] = '{8'sd43, 8'sd103, 8'sd59,
                                               -8'sd17, -8'sd11, 8'sd5};

  // Round a full-precision filter output to a stored sample: drop FRAC bits
  // with round-half-up, then saturate to SW bits.
  function automatic logic signed [31:0] quantize(logic signed [31:0] y,
                                                  int unsigned frac, int unsigned sw);
    logic signed [31:0] r, hi, lo;
    r  = (y + (32'sd1 <<< (frac - 1))) >>> frac;
    hi = (32'sd1 <<< (sw - 1)) - 1;
    lo = -(32'sd1 <<< (sw - 1));
    if (r > hi) r = hi;
    if (r < lo) r = lo;
    return r;
  endfunction

endpackage
