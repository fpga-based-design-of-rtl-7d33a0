// df2_delay_line -- the state memory of a direct form II IIR filter.
//
// A chain of DEPTH registers holding the intermediate signal w of the
// direct form II structure: taps[k-1] = w[n-k] for k = 1..DEPTH. Both the
// recursive (denominator) and the non-recursive (numerator) half of the
// filter read the same taps, which is what lets direct form II use one
// delay per order instead of two.
//
// Interface: when shift is high at a rising clock edge, d (the new w[n])
// enters taps[0] and every tap moves one place down the chain; otherwise
// the taps hold. rst_n is an active-low synchronous reset that clears every
// tap to zero. The structure follows the direct form II realisation; the
// word width, the reset and the shift enable are this design's choices.
module df2_delay_line #(
  parameter int DEPTH = 16,
  parameter int W     = 28
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                shift,
  input  logic signed [W-1:0] d,
  output logic signed [W-1:0] taps [DEPTH]
);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int k = 0; k < DEPTH; k++) taps[k] <= '0;
    end else if (shift) begin
      taps[0] <= d;
      for (int k = 1; k < DEPTH; k++) taps[k] <= taps[k-1];
    end
  end

endmodule
