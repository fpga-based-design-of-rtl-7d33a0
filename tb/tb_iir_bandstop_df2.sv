// tb_iir_bandstop_df2 -- end-to-end test of the band-stop filter at its
// default parameters (factored-CSD multipliers, 16-bit input, 28-bit state,
// 18-bit output).
//
// Every output sample is compared bit for bit with a software model of the
// same fixed-point recursion that multiplies with '*' (iir_ref_pkg), and
// out_valid must follow in_valid by exactly one clock. Stimuli:
//   * an impulse, full-scale random noise, and sine tones in the pass band
//     (1, 4, 20 kHz), at the band edges and in the stop band (10, 10.8,
//     11.6 kHz), all at fs = 48 kHz;
//   * random idle cycles (in_valid low) during which the state must hold;
//   * a synchronous reset in the middle of a stream.
// For each tone the gain measured on the last 960 outputs
// (a whole number of periods of every tone) is compared with
// |H| computed in floating point from the coefficients, and the stop-band
// tones must be at least 40 dB down, the pass-band tones within 0.1 dB.
// The coefficients themselves are checked against the specification:
// |H| = -3 dB (within 0.25 dB, the Q16 rounding moves the lower edge
// by 0.13 dB) at 8400 and 13200 Hz and unity at DC.
// Each mechanism (idle cycle, reset, stop-band and pass-band tone) is
// counted and must occur at least once.
module tb_iir_bandstop_df2;
  import iir_pkg::*;
  import iir_ref_pkg::*;

  localparam real FS = 48000.0;
  localparam real PI = 3.14159265358979323846;

  logic                clk = 1'b0;
  logic                rst_n;
  logic                in_valid;
  logic signed [15:0]  x_in;
  logic                out_valid;
  logic signed [17:0]  y_out;

  int checks = 0, failures = 0;
  int n_idle = 0, n_reset = 0, n_stop = 0, n_pass = 0, n_samples = 0;

  iir_ref ref_model;

  iir_bandstop_df2 u_dut (
    .clk(clk), .rst_n(rst_n), .in_valid(in_valid), .x_in(x_in),
    .out_valid(out_valid), .y_out(y_out));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // |H(e^jw)| from the coefficients, in floating point.
  function automatic real mag_h(real f);
    real br, bi, ar, ai, wk;
    br = 0.0; bi = 0.0; ar = 0.0; ai = 0.0;
    for (int k = 0; k <= ORDER; k++) begin
      wk = 2.0 * PI * f / FS * k;
      br += real'(B_COEF[k]) * $cos(wk);
      bi -= real'(B_COEF[k]) * $sin(wk);
      ar += real'(A_COEF[k]) * $cos(wk);
      ai -= real'(A_COEF[k]) * $sin(wk);
    end
    return $sqrt((br*br + bi*bi) / (ar*ar + ai*ai));
  endfunction

  function automatic real rabs(real v);
    return (v < 0.0) ? -v : v;
  endfunction

  function automatic real db(real g);
    return 20.0 * $log10(g);
  endfunction

  // Present one sample (or an idle cycle) and check the registered result.
  task automatic drive(input logic valid, input longint x, output longint y);
    longint exp;
    @(negedge clk);
    in_valid = valid;
    x_in     = 16'(x);
    exp      = valid ? ref_model.step(x) : 0;
    @(posedge clk);
    #1;
    checks++;
    if (out_valid !== valid) begin
      failures++;
      $display("FAIL out_valid=%0b one cycle after in_valid=%0b", out_valid, valid);
    end
    if (valid) begin
      n_samples++;
      checks++;
      if (longint'(y_out) != exp) begin
        failures++;
        if (failures < 20) $display("FAIL sample %0d x=%0d y=%0d exp=%0d", n_samples, x, y_out, exp);
      end
    end else begin
      n_idle++;
    end
    y = longint'(y_out);
  endtask

  task automatic do_reset();
    @(negedge clk);
    rst_n = 1'b0;
    in_valid = 1'b0;
    @(posedge clk);
    #1;
    rst_n = 1'b1;
    ref_model.reset();
    n_reset++;
    checks++;
    if (out_valid !== 1'b0 || y_out !== '0) begin
      failures++;
      $display("FAIL outputs not cleared by reset");
    end
  endtask

  // Feed a continuous tone and measure the gain over the last 1024 outputs.
  task automatic tone(input real f, input bit stop);
    real amp, si, co, ph, g, gh;
    longint y;
    int n;
    amp = 20000.0;
    n = 3072;
    si = 0.0; co = 0.0;
    do_reset();
    for (int t = 0; t < n; t++) begin
      drive(1'b1, longint'($rtoi($floor(amp * $sin(2.0*PI*f/FS*t) + 0.5))), y);
      if (t >= n - 960) begin
        ph = 2.0 * PI * f / FS * t;
        si += real'(y) * $sin(ph);
        co += real'(y) * $cos(ph);
      end
    end
    g  = 2.0 * $sqrt(si*si + co*co) / 960.0 / amp;
    gh = mag_h(f);
    $display("tone %0.0f Hz: measured %0.2f dB, designed %0.2f dB", f, db(g), db(gh));
    checks++;
    if (stop) begin
      n_stop++;
      if (g > 0.01 || gh > 0.01) begin
        failures++;
        $display("FAIL stop-band tone %0.0f Hz not 40 dB down", f);
      end
    end else begin
      n_pass++;
      if (rabs(db(g)) > 0.1 || rabs(g - gh) > 0.005) begin
        failures++;
        $display("FAIL pass-band tone %0.0f Hz gain %f (designed %f)", f, g, gh);
      end
    end
  endtask

  initial begin
    longint y;
    ref_model = new();
    rst_n = 1'b0; in_valid = 1'b0; x_in = '0;
    repeat (2) @(posedge clk);
    #1;
    rst_n = 1'b1;

    // Specification: -3 dB at both band edges, unity gain at DC.
    checks += 3;
    if (rabs(db(mag_h(8400.0)) + 3.01) > 0.25) begin
      failures++; $display("FAIL |H(8400 Hz)| = %f dB", db(mag_h(8400.0)));
    end
    if (rabs(db(mag_h(13200.0)) + 3.01) > 0.25) begin
      failures++; $display("FAIL |H(13200 Hz)| = %f dB", db(mag_h(13200.0)));
    end
    if (rabs(mag_h(0.0) - 1.0) > 0.001) begin
      failures++; $display("FAIL DC gain %f", mag_h(0.0));
    end

    // Impulse response with idle cycles in between.
    drive(1'b1, 16384, y);
    for (int t = 0; t < 300; t++) drive($urandom_range(0, 3) != 0, 0, y);

    // Full-scale random noise with idle cycles, reset in the middle.
    for (int t = 0; t < 4000; t++) begin
      if (t == 2000) do_reset();
      drive($urandom_range(0, 4) != 0, longint'($signed(16'($urandom()))), y);
    end

    // Worst-case input for the state word: the sign of the 1/A(z) impulse
    // response, reversed in time, at full scale.
    begin
      iir_ref probe;
      longint h [600];
      probe = new();
      for (int t = 0; t < 600; t++) begin
        // w response of 1/A to a unit impulse, scaled by 2**12
        void'(probe.step(t == 0 ? 4096 : 0));
        h[t] = probe.w[0];
      end
      do_reset();
      for (int t = 599; t >= 0; t--)
        drive(1'b1, h[t] >= 0 ? 32767 : -32768, y);
    end

    tone(1000.0,  1'b0);
    tone(4000.0,  1'b0);
    tone(20000.0, 1'b0);
    tone(10000.0, 1'b1);
    tone(10800.0, 1'b1);
    tone(11600.0, 1'b1);

    checks++;
    if (n_idle == 0 || n_reset == 0 || n_stop == 0 || n_pass == 0) begin
      failures++;
      $display("FAIL a mechanism never happened");
    end
    $display("samples=%0d idle=%0d resets=%0d passband_tones=%0d stopband_tones=%0d",
             n_samples, n_idle, n_reset, n_pass, n_stop);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
