// fcsd_const_mult -- multiply a signed sample by a fixed integer coefficient
// with the factored canonical-signed-digit (FCSD) method.
//
// At elaboration the coefficient is split into COEF = F1 * F2, F1 being the
// odd factor (up to MAX_FACTOR) for which the two CSD networks of F1 and F2
// together need the fewest adders (iir_pkg::fcsd_factor). The product is then formed
// by two CSD shift-and-add networks in cascade: t = F1 * x, p = F2 * t.
// Sharing the factor saves adders against plain CSD at the cost of a longer
// adder chain. Example: 99 (four CSD digits, three adders) becomes
// 3 * 33 = (4 - 1) * (32 + 1), two adders. When no factor helps, F1 = 1 and
// the block is a single CSD network.
//
// Interface: x (IN_W bits, signed) in, p (OUT_W bits, signed) out.
// Timing: purely combinational. OUT_W must hold the exact product; the
// second stage works on a wider word and its result is cut to OUT_W.
// Factorisation followed by CSD is the method of the filter this design
// implements; the factor search (odd factors up to MAX_FACTOR, two factors)
// is this design's choice.
module fcsd_const_mult
  import iir_pkg::*;
#(
  parameter longint COEF       = 99,
  parameter int     IN_W       = 16,
  parameter int     OUT_W      = 24,
  parameter int     MAX_FACTOR = 1023
) (
  input  logic signed [IN_W-1:0]  x,
  output logic signed [OUT_W-1:0] p
);

  localparam longint F1    = fcsd_factor(COEF, MAX_FACTOR);
  localparam longint F2    = COEF / F1;
  localparam int     MID_W = IN_W + mag_bits(F1) + 1;
  localparam int     P2_W  = MID_W + mag_bits(F2) + 1;

  if (OUT_W < IN_W + mag_bits(COEF) + 1) begin : g_width_check
    $error("fcsd_const_mult: OUT_W too small for COEF");
  end

  if (F1 == 1) begin : g_plain
    csd_const_mult #(.COEF(COEF), .IN_W(IN_W), .OUT_W(OUT_W)) u_csd (
      .x(x),
      .p(p)
    );
  end else begin : g_factored
    logic signed [MID_W-1:0] t;
    logic signed [P2_W-1:0]  p2;

    csd_const_mult #(.COEF(F1), .IN_W(IN_W), .OUT_W(MID_W)) u_f1 (
      .x(x),
      .p(t)
    );

    csd_const_mult #(.COEF(F2), .IN_W(MID_W), .OUT_W(P2_W)) u_f2 (
      .x(t),
      .p(p2)
    );

    // The product COEF*x fits OUT_W bits, so dropping the upper bits of the
    // second stage's wider word is exact.
    assign p = OUT_W'(p2);
  end

endmodule
