// iir_pkg -- constants and elaboration-time helpers shared by the band-stop
// IIR filter and its shift-and-add multipliers.
//
// What it holds:
//   * The filter order (16) and the coefficient format: every coefficient is
//     an integer scaled by 2**COEF_FRAC (Q16), so a0 = 65536.
//   * The quantised coefficients of a 16th-order Butterworth band-stop filter
//     with -3 dB edges at 8400 Hz and 13200 Hz for a 48000 Hz sample rate
//     (an 8th-order analog Butterworth low-pass prototype, transformed to a
//     band-stop and mapped to z with the prewarped bilinear transform), each
//     value round(c * 65536). The specification is the one of the filter this
//     design follows; the Q16 rounding is this design's choice. With Q16 the
//     largest pole radius is 0.946 and the stop band (10-11.6 kHz) is
//     attenuated by more than 50 dB.
//   * Canonical signed digit (CSD) recoding: csd_pos_mask / csd_neg_mask give,
//     for a constant, the bit positions of its +1 and -1 digits in
//     non-adjacent form (no two neighbouring digits non-zero, the fewest
//     non-zero digits of any signed-digit form).
//   * Factored CSD (FCSD): fcsd_factor picks the odd factor f of a constant c
//     for which two cascaded CSD networks, f and c/f, need the fewest adders,
//     (csd_cost(f) - 1) + (csd_cost(c/f) - 1); it returns 1 when no split
//     needs fewer adders than plain CSD, csd_cost(c) - 1. The search range
//     is this design's choice.
// All functions are only called on constants, at elaboration time.
package iir_pkg;

  localparam int ORDER     = 16;
  localparam int COEF_FRAC = 16;

  typedef enum logic {
    MULT_CSD  = 1'b0,
    MULT_FCSD = 1'b1
  } mult_style_e;

  typedef longint coef_array_t [ORDER+1];

  // Numerator b0..b16 (Q16).
  localparam coef_array_t B_COEF = '{
      12640,   -33266,   139423,  -258061,   594099,  -827311,  1324279, -1424532,
    1713927, -1424532,  1324279,  -827311,   594099,  -258061,   139423,   -33266,
      12640};

  // Denominator a0..a16 (Q16), a0 = 1.0.
  localparam coef_array_t A_COEF = '{
      65536,  -137813,   441109,  -654055,  1179173, -1327732,  1694182, -1488799,
    1447683,  -992846,   754239,  -392521,   232394,   -84869,    38055,    -7706,
       2438};

  // Bit positions of the +1 digits of c in non-adjacent form.
  function automatic logic [63:0] csd_pos_mask(longint c);
    logic [63:0] m;
    longint      r;
    m = '0;
    r = c;
    for (int k = 0; k < 63; k++) begin
      if (r[0]) begin
        if ((r & 64'sd3) == 64'sd1) begin
          m[k] = 1'b1;
          r = r - 1;
        end else begin
          r = r + 1;
        end
      end
      r = r >>> 1;
    end
    return m;
  endfunction

  // Bit positions of the -1 digits of c in non-adjacent form.
  function automatic logic [63:0] csd_neg_mask(longint c);
    logic [63:0] m;
    longint      r;
    m = '0;
    r = c;
    for (int k = 0; k < 63; k++) begin
      if (r[0]) begin
        if ((r & 64'sd3) == 64'sd1) begin
          r = r - 1;
        end else begin
          m[k] = 1'b1;
          r = r + 1;
        end
      end
      r = r >>> 1;
    end
    return m;
  endfunction

  // Number of non-zero CSD digits of c; the adder count of its
  // shift-and-add network is this number less one.
  function automatic int csd_cost(longint c);
    return $countones(csd_pos_mask(c)) + $countones(csd_neg_mask(c));
  endfunction

  // Odd factor f (3 <= f <= max_f) of c whose split into f * (c/f) needs the
  // fewest adders, csd_cost(f) + csd_cost(c/f) - 2; 1 when plain CSD, with
  // csd_cost(c) - 1 adders, is at least as cheap.
  function automatic longint fcsd_factor(longint c, int max_f);
    longint best_f;
    int     best_cost;
    int     cost;
    best_f    = 1;
    best_cost = csd_cost(c) - 1;
    for (longint f = 3; f <= longint'(max_f); f += 2) begin
      if (c != 0 && (c % f) == 0) begin
        cost = csd_cost(f) + csd_cost(c / f) - 2;
        if (cost < best_cost) begin
          best_cost = cost;
          best_f    = f;
        end
      end
    end
    return best_f;
  endfunction

  // Number of bits that hold |c| as an unsigned magnitude.
  function automatic int mag_bits(longint c);
    longint m;
    int     n;
    m = (c < 0) ? -c : c;
    n = 0;
    while (m != 0) begin
      m = m >> 1;
      n++;
    end
    return n;
  endfunction

endpackage
