// Self-checking testbench for fir_filter at its default sizes (5 taps, 8-bit
// signed samples and coefficients, 32-bit sums).
// A reference model keeps the last five accepted samples and forms
// sum h_k * x[n-k] in plain integer arithmetic. Every cycle it checks that
// out_valid follows in_valid by exactly one clock and, when valid, that y_out
// matches. Sequences: impulse response, step, extreme values, random samples
// with random gaps in in_valid, a reset in mid-stream, and a coefficient
// change. Gaps (stalls), resets and negative outputs are counted and must
// each occur.
module tb_fir_filter;
  import cska_pkg::*;
  localparam int TAPS = FIR_TAPS;

  int checks = 0, failures = 0;
  int stall_cnt = 0, reset_cnt = 0, neg_cnt = 0;

  logic clk = 1'b0;
  logic rst_n;
  logic in_valid;
  logic signed [7:0]  x_in;
  logic signed [7:0]  coef [TAPS];
  logic               out_valid;
  logic signed [31:0] y_out;

  fir_filter dut (.clk(clk), .rst_n(rst_n), .in_valid(in_valid), .x_in(x_in), .coef(coef),
                  .out_valid(out_valid), .y_out(y_out));

  always #5 clk = ~clk;

  int hist [TAPS];
  int expected;

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic do_reset();
    @(negedge clk);
    rst_n = 1'b0; in_valid = 1'b0; x_in = '0;
    @(posedge clk); #1;
    foreach (hist[k]) hist[k] = 0;
    checks++;
    if (out_valid !== 1'b0 || y_out !== '0) begin
      failures++;
      $display("FAIL reset: out_valid=%b y=%0d", out_valid, y_out);
    end
    reset_cnt++;
    @(negedge clk);
    rst_n = 1'b1;
  endtask

  // one clock: drive at the falling edge, check after the rising edge
  task automatic step(input logic v, input int x);
    @(negedge clk);
    in_valid = v;
    x_in = 8'(x);
    if (v) begin
      for (int k = TAPS - 1; k > 0; k--) hist[k] = hist[k-1];
      hist[0] = x;
      expected = 0;
      for (int k = 0; k < TAPS; k++) expected += int'(coef[k]) * hist[k];
    end else begin
      stall_cnt++;
    end
    @(posedge clk); #1;
    checks++;
    if (out_valid !== v) begin
      failures++;
      $display("FAIL out_valid=%b, expected %b one cycle after in_valid", out_valid, v);
    end else if (v && y_out !== 32'(expected)) begin
      failures++;
      $display("FAIL y=%0d expected %0d", y_out, expected);
    end else if (v && expected < 0) begin
      neg_cnt++;
    end
  endtask

  initial begin
    rst_n = 1'b0; in_valid = 1'b0; x_in = '0;
    coef = '{8'sd3, -8'sd5, 8'sd7, 8'sd11, -8'sd13};
    repeat (2) @(posedge clk);
    do_reset();

    // impulse: the output reads back h0..h4
    step(1'b1, 1);
    for (int k = 0; k < 6; k++) step(1'b1, 0);
    // step input
    for (int k = 0; k < 7; k++) step(1'b1, 1);
    // extremes
    coef = '{-8'sd128, -8'sd128, -8'sd128, -8'sd128, -8'sd128};
    for (int k = 0; k < 6; k++) step(1'b1, -128);
    for (int k = 0; k < 6; k++) step(1'b1, 127);
    coef = '{8'sd127, -8'sd128, 8'sd127, -8'sd128, 8'sd127};
    for (int k = 0; k < 6; k++) step(1'b1, (k % 2 == 0) ? -128 : 127);

    // random stream with gaps
    for (int i = 0; i < 3000; i++) begin
      if (i == 1500) begin
        do_reset();
        foreach (coef[k]) coef[k] = 8'($urandom);
      end
      step(($urandom % 4) != 0, int'($signed(8'($urandom))));
    end

    checks += 3;
    if (stall_cnt == 0) begin failures++; $display("FAIL no stall cycle"); end
    if (reset_cnt < 2)  begin failures++; $display("FAIL no mid-stream reset"); end
    if (neg_cnt == 0)   begin failures++; $display("FAIL no negative output"); end
    $display("stall cycles %0d, resets %0d, negative outputs %0d", stall_cnt, reset_cnt, neg_cnt);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
