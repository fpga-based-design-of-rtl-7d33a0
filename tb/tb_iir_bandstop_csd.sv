// tb_iir_bandstop_csd -- the band-stop filter built with plain CSD
// multipliers (MULT_STYLE = MULT_CSD), run side by side with the default
// factored-CSD build. Both take the same full-scale random stream with idle
// cycles; each output is compared with the software model of iir_ref_pkg,
// and the two builds must agree bit for bit, since both multiplier styles
// form exact products.
module tb_iir_bandstop_csd;
  import iir_pkg::*;
  import iir_ref_pkg::*;

  logic               clk = 1'b0;
  logic               rst_n, in_valid;
  logic signed [15:0] x_in;
  logic               v_csd, v_fcsd;
  logic signed [17:0] y_csd, y_fcsd;
  int checks = 0, failures = 0, n_idle = 0;
  iir_ref ref_model;

  iir_bandstop_df2 #(.MULT_STYLE(MULT_CSD)) u_csd (
    .clk(clk), .rst_n(rst_n), .in_valid(in_valid), .x_in(x_in),
    .out_valid(v_csd), .y_out(y_csd));

  iir_bandstop_df2 #(.MULT_STYLE(MULT_FCSD)) u_fcsd (
    .clk(clk), .rst_n(rst_n), .in_valid(in_valid), .x_in(x_in),
    .out_valid(v_fcsd), .y_out(y_fcsd));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint exp;
    ref_model = new();
    rst_n = 1'b0; in_valid = 1'b0; x_in = '0;
    repeat (2) @(posedge clk);
    #1;
    rst_n = 1'b1;
    for (int t = 0; t < 5000; t++) begin
      @(negedge clk);
      in_valid = ($urandom_range(0, 4) != 0);
      x_in     = 16'($urandom());
      exp      = in_valid ? ref_model.step(longint'(x_in)) : 0;
      if (!in_valid) n_idle++;
      @(posedge clk);
      #1;
      checks += 2;
      if (v_csd !== in_valid || v_fcsd !== in_valid) begin
        failures++;
        $display("FAIL out_valid timing");
      end
      if (in_valid && (longint'(y_csd) != exp || y_fcsd !== y_csd)) begin
        failures++;
        if (failures < 20) $display("FAIL t=%0d csd=%0d fcsd=%0d exp=%0d", t, y_csd, y_fcsd, exp);
      end
    end
    checks++;
    if (n_idle == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
