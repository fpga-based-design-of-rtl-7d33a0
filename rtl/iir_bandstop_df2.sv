// iir_bandstop_df2 -- 16th-order Butterworth band-stop IIR filter in direct
// form II, built without multipliers.
//
// The filter removes the band 8.4-13.2 kHz from a signal sampled at 48 kHz
// and passes everything else with unit gain. Its transfer function is
// H(z) = B(z)/A(z) with the Q16 coefficients of iir_pkg (a0 = 2**16).
// Direct form II computes, for every input sample x[n]:
//   w[n] = round( (x[n]*2**16 - sum_{k=1..16} a_k * w[n-k]) / 2**16 )
//   y[n] = round( (sum_{k=0..16} b_k * w[n-k]) / 2**16 )
// where the w[n-k] are the taps of one shared delay line (df2_delay_line).
// Every coefficient product is a fixed shift-and-add network: canonical
// signed digit (csd_const_mult) or factored CSD (fcsd_const_mult), chosen
// by MULT_STYLE for the whole filter. Rounding adds 2**15 and shifts right
// arithmetically (round half up).
//
// Interface: clk, rst_n (active-low, synchronous, clears the state and the
// output), in_valid/x_in (one signed IN_W-bit sample per cycle at most),
// out_valid/y_out (signed OUT_W-bit result). Timing: the whole recursion is
// one combinational path; a sample accepted at a clock edge updates the
// delay line at that edge and its output appears in y_out with out_valid
// from that same edge, i.e. one cycle after x_in was presented. Throughput
// is one sample per clock; cycles with in_valid low leave the state alone.
//
// Follows the filter it implements: band-stop Butterworth specification,
// order 16, direct form II, CSD and FCSD multiplier-less coefficients, one
// unpipelined datapath per sample. This design's own choices: Q16
// coefficients, 16-bit input, 28-bit state (the worst-case gain of 1/A(z) is
// 541, ten bits), 18-bit output (worst-case gain of H is 3.54), rounding,
// the valid handshake and the reset. The assertions check that the state
// and the output never wrap.
module iir_bandstop_df2
  import iir_pkg::*;
#(
  parameter mult_style_e MULT_STYLE = MULT_FCSD,
  parameter int          IN_W       = 16,
  parameter int          W_W        = 28,
  parameter int          OUT_W      = 18
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    in_valid,
  input  logic signed [IN_W-1:0]  x_in,
  output logic                    out_valid,
  output logic signed [OUT_W-1:0] y_out
);

  // Products and sums: 28-bit state times a coefficient below 2**21, summed
  // over 17 terms, fits in 54 bits.
  localparam int ACC_W = W_W + 28;
  localparam logic signed [ACC_W-1:0] HALF = ACC_W'(64'sd1 <<< (COEF_FRAC - 1));

  logic signed [W_W-1:0]   w_tap [ORDER];  // w[n-1] .. w[n-16]
  logic signed [W_W-1:0]   w_new;          // w[n]
  logic signed [ACC_W-1:0] fb_prod [1:ORDER];
  logic signed [ACC_W-1:0] ff_prod [0:ORDER];
  logic signed [ACC_W-1:0] fb_sum, ff_sum, v_sum, w_full, y_full;

  // Recursive half: a_k * w[n-k], k = 1..16.
  for (genvar k = 1; k <= ORDER; k++) begin : g_fb
    if (MULT_STYLE == MULT_FCSD) begin : g_f
      fcsd_const_mult #(.COEF(-A_COEF[k]), .IN_W(W_W), .OUT_W(ACC_W)) u_mul (
        .x(w_tap[k-1]), .p(fb_prod[k]));
    end else begin : g_c
      csd_const_mult #(.COEF(-A_COEF[k]), .IN_W(W_W), .OUT_W(ACC_W)) u_mul (
        .x(w_tap[k-1]), .p(fb_prod[k]));
    end
  end

  always_comb begin
    fb_sum = '0;
    for (int k = 1; k <= ORDER; k++) fb_sum = fb_sum + fb_prod[k];
    v_sum  = (ACC_W'(x_in) <<< COEF_FRAC) + fb_sum;
    w_full = (v_sum + HALF) >>> COEF_FRAC;
    w_new  = W_W'(w_full);
  end

  // Non-recursive half: b_0 * w[n] and b_k * w[n-k].
  for (genvar k = 0; k <= ORDER; k++) begin : g_ff
    logic signed [W_W-1:0] src;
    if (k == 0) begin : g_src0
      assign src = w_new;
    end else begin : g_srck
      assign src = w_tap[k-1];
    end
    if (MULT_STYLE == MULT_FCSD) begin : g_f
      fcsd_const_mult #(.COEF(B_COEF[k]), .IN_W(W_W), .OUT_W(ACC_W)) u_mul (
        .x(src), .p(ff_prod[k]));
    end else begin : g_c
      csd_const_mult #(.COEF(B_COEF[k]), .IN_W(W_W), .OUT_W(ACC_W)) u_mul (
        .x(src), .p(ff_prod[k]));
    end
  end

  always_comb begin
    ff_sum = '0;
    for (int k = 0; k <= ORDER; k++) ff_sum = ff_sum + ff_prod[k];
    y_full = (ff_sum + HALF) >>> COEF_FRAC;
  end

  df2_delay_line #(.DEPTH(ORDER), .W(W_W)) u_state (
    .clk  (clk),
    .rst_n(rst_n),
    .shift(in_valid),
    .d    (w_new),
    .taps (w_tap)
  );

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      y_out     <= '0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) y_out <= OUT_W'(y_full);
    end
  end

  // The state and the output must fit their words for every accepted sample.
  always_ff @(posedge clk) begin
    if (rst_n && in_valid) begin
      a_state_fits : assert (w_full == ACC_W'(w_new))
        else $error("iir_bandstop_df2: state word overflow");
      a_output_fits : assert (y_full == ACC_W'(OUT_W'(y_full)))
        else $error("iir_bandstop_df2: output word overflow");
    end
  end

endmodule
