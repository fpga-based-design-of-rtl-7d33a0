// csd_const_mult -- multiply a signed sample by a fixed integer coefficient
// with shifts and adders only (no multiplier).
//
// The coefficient COEF is recoded at elaboration time into canonical signed
// digits (non-adjacent form): COEF = sum_k d_k * 2**k with d_k in {-1,0,+1}
// and no two neighbouring digits non-zero. The product is then
//   p = sum over d_k=+1 of (x << k)  -  sum over d_k=-1 of (x << k),
// so the network costs one adder or subtractor per non-zero digit after the
// first. Example: 99 = 128 - 32 + 4 - 1, p = (x<<7) - (x<<5) + (x<<2) - x.
// The loop below runs over constant masks, so only the non-zero digits turn
// into hardware.
//
// Interface: x (IN_W bits, signed) in, p (OUT_W bits, signed) out.
// Timing: purely combinational. OUT_W must hold IN_W + bits(|COEF|) + 1 bits
// for the product to be exact; an elaboration error reports a smaller OUT_W.
// The shift-and-add principle and the CSD recoding follow the filter this
// design implements; the widths and the automatic recoding are this
// design's choices.
module csd_const_mult
  import iir_pkg::*;
#(
  parameter longint COEF  = 99,
  parameter int     IN_W  = 16,
  parameter int     OUT_W = 24
) (
  input  logic signed [IN_W-1:0]  x,
  output logic signed [OUT_W-1:0] p
);

  localparam logic [63:0] POS = csd_pos_mask(COEF);
  localparam logic [63:0] NEG = csd_neg_mask(COEF);

  if (OUT_W < IN_W + mag_bits(COEF) + 1) begin : g_width_check
    $error("csd_const_mult: OUT_W too small for COEF");
  end

  logic signed [OUT_W-1:0] xe;
  assign xe = OUT_W'(x);

  always_comb begin
    p = '0;
    for (int k = 0; k < OUT_W; k++) begin
      if (POS[k]) p = p + (xe <<< k);
      else if (NEG[k]) p = p - (xe <<< k);
    end
  end

endmodule
