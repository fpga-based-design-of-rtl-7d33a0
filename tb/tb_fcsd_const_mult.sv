// tb_fcsd_const_mult -- self-checking test of the factored-CSD multiplier.
// Six instances with different constants (the 99 example, its negative, one,
// a power of two, and the largest feed-forward and feedback coefficients of
// the filter) are driven with corner and random inputs; every product is
// compared with an ordinary 64-bit multiplication. The CSD recoding is also
// checked: the digit masks must rebuild the constant and have no two
// neighbouring non-zero digits. The factor chosen for 99 must be 3
// (99 = 3 * 33 = (4-1)*(32+1), two adders against three) and the one for
// 1324279 must be 131; 1 and 1713927 must stay unfactored.
module tb_fcsd_const_mult;
  import iir_pkg::*;

  localparam int IN_W  = 28;
  localparam int OUT_W = 56;
  localparam int N     = 6;
  localparam longint CS [N] = '{99, -99, 1, 4096, 1713927, -1694182};

  logic signed [IN_W-1:0]  x;
  logic signed [OUT_W-1:0] p [N];
  int checks = 0, failures = 0;

  for (genvar i = 0; i < N; i++) begin : g_dut
    fcsd_const_mult #(.COEF(CS[i]), .IN_W(IN_W), .OUT_W(OUT_W)) u_dut (.x(x), .p(p[i]));
  end

  task automatic check_all();
    longint exp;
    #1;
    for (int i = 0; i < N; i++) begin
      exp = longint'(x) * CS[i];
      checks++;
      if (longint'(p[i]) != exp) begin
        failures++;
        $display("FAIL coef=%0d x=%0d got=%0d exp=%0d", CS[i], x, p[i], exp);
      end
    end
  endtask

  initial begin : watchdog
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // Recoding: masks rebuild the constant, digits are non-adjacent.
    for (int i = 0; i < N; i++) begin
      logic [63:0] pm, nm;
      longint r;
      pm = csd_pos_mask(CS[i]);
      nm = csd_neg_mask(CS[i]);
      r = 0;
      for (int k = 0; k < 63; k++) begin
        if (pm[k]) r += (64'sd1 <<< k);
        if (nm[k]) r -= (64'sd1 <<< k);
      end
      checks++;
      if (r != CS[i] || ((pm | nm) & ((pm | nm) >> 1)) != 0) begin
        failures++;
        $display("FAIL recoding of %0d", CS[i]);
      end
    end
    checks++;
    if (csd_cost(99) != 4) begin
      failures++;
      $display("FAIL csd_cost(99)=%0d", csd_cost(99));
    end
    checks += 4;
    if (fcsd_factor(99, 1023) != 3) begin failures++; $display("FAIL factor of 99"); end
    if (fcsd_factor(1713927, 1023) != 1) begin failures++; $display("FAIL factor of 1713927"); end
    if (fcsd_factor(1, 1023) != 1) begin failures++; $display("FAIL factor of 1"); end
    if (fcsd_factor(1324279, 1023) != 131) begin failures++; $display("FAIL factor of 1324279"); end
    x = '0;                       check_all();
    x = 1;                        check_all();
    x = -1;                       check_all();
    x = {1'b0, {(IN_W-1){1'b1}}}; check_all();
    x = {1'b1, {(IN_W-1){1'b0}}}; check_all();
    for (int t = 0; t < 2000; t++) begin
      x = IN_W'($urandom());
      check_all();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
