// tb_df2_delay_line -- self-checking test of the direct form II state chain.
// Random words are shifted in with a random shift enable; a queue model in
// the testbench predicts every tap after every clock. A synchronous reset in
// the middle of the run must clear all taps.
module tb_df2_delay_line;
  localparam int DEPTH = 16;
  localparam int W     = 28;

  logic                clk = 1'b0;
  logic                rst_n, shift;
  logic signed [W-1:0] d;
  logic signed [W-1:0] taps [DEPTH];
  logic signed [W-1:0] model [DEPTH];
  int checks = 0, failures = 0;
  int holds = 0, resets = 0;

  df2_delay_line #(.DEPTH(DEPTH), .W(W)) u_dut (
    .clk(clk), .rst_n(rst_n), .shift(shift), .d(d), .taps(taps));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic compare();
    for (int k = 0; k < DEPTH; k++) begin
      checks++;
      if (taps[k] !== model[k]) begin
        failures++;
        $display("FAIL tap %0d got %0d exp %0d", k, taps[k], model[k]);
      end
    end
  endtask

  initial begin
    rst_n = 1'b0; shift = 1'b0; d = '0;
    for (int k = 0; k < DEPTH; k++) model[k] = '0;
    @(posedge clk); #1;
    compare();
    rst_n = 1'b1;
    for (int t = 0; t < 1000; t++) begin
      shift = ($urandom_range(0, 3) != 0);
      d     = W'($urandom());
      rst_n = (t != 500);
      @(posedge clk);
      if (!rst_n) begin
        resets++;
        for (int k = 0; k < DEPTH; k++) model[k] = '0;
      end else if (shift) begin
        for (int k = DEPTH-1; k > 0; k--) model[k] = model[k-1];
        model[0] = d;
      end else begin
        holds++;
      end
      #1;
      compare();
    end
    checks++;
    if (holds == 0 || resets == 0) begin
      failures++;
      $display("FAIL hold or reset never exercised");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
