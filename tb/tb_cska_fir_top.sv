// End-to-end testbench for cska_fir_top with every parameter at its default.
// Adder side: the five characterization vectors (each operand bit follows a
// fixed 5-step pattern), then random and long-propagate operands, checked
// against a + b + cin. For each of the seven slices it counts carry skips
// (carry in = 1 and the slice propagates) and BEC selections (carry in = 1);
// the middle slice is the prefix adder, for which the BEC count stands for
// "carry-in used".
// Filter side, running at the same time: a complete 5-tap convolution with
// gaps in the sample stream and a reset, checked against a reference model,
// including the one-cycle latency. Every mechanism must occur at least once.
module tb_cska_fir_top;
  import cska_pkg::*;
  localparam int TAPS = FIR_TAPS;

  int checks = 0, failures = 0;

  logic [31:0]        add_a, add_b, add_sum;
  logic               add_cin, add_cout;
  logic               clk = 1'b0;
  logic               rst_n;
  logic               fir_in_valid, fir_out_valid;
  logic signed [7:0]  fir_x;
  logic signed [7:0]  fir_coef [TAPS];
  logic signed [31:0] fir_y;

  cska_fir_top dut (.*);

  always #5 clk = ~clk;

  int skip_cnt [CSKA_STAGES];
  int bec_cnt  [CSKA_STAGES];
  int stall_cnt = 0, reset_cnt = 0, neg_cnt = 0, sample_cnt = 0;
  int hist [TAPS];
  int expected;

  function automatic logic [4:0] pat_a(int k);
    if (k < 16) return 5'b10110;
    if (k < 21) return 5'b10010;
    if (k < 27) return 5'b10110;
    return 5'b00000;
  endfunction
  function automatic logic [4:0] pat_b(int k);
    if (k < 8)  return 5'b10110;
    if (k < 16) return 5'b11111;
    if (k < 24) return 5'b00000;
    return 5'b11001;
  endfunction

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // drive one adder operation; checked after the clock edge of the cycle
  task automatic drive_add(input logic [31:0] x, input logic [31:0] y, input logic c);
    add_a = x; add_b = y; add_cin = c;
  endtask

  task automatic check_add();
    logic [32:0] e;
    logic [31:0] carries, mask;
    int unsigned lsb;
    e = {1'b0, add_a} + {1'b0, add_b} + {32'b0, add_cin};
    checks++;
    if ({add_cout, add_sum} !== e) begin
      failures++;
      if (failures < 10)
        $display("FAIL add a=%h b=%h cin=%b -> %b_%h exp %h", add_a, add_b, add_cin,
                 add_cout, add_sum, e);
    end
    carries = add_a ^ add_b ^ e[31:0];
    lsb = 0;
    for (int st = 0; st < CSKA_STAGES; st++) begin
      mask = ((32'd1 << CSKA_STAGE_W[st]) - 1) << lsb;
      if (carries[lsb]) begin
        bec_cnt[st]++;
        if (((add_a ^ add_b) & mask) == mask) skip_cnt[st]++;
      end
      lsb += CSKA_STAGE_W[st];
    end
  endtask

  // one clock: adder operands and a filter sample go in at the falling edge
  task automatic cycle(input logic [31:0] x, input logic [31:0] y, input logic c,
                       input logic v, input int s, input logic rst);
    @(negedge clk);
    drive_add(x, y, c);
    rst_n = ~rst;
    fir_in_valid = v;
    fir_x = 8'(s);
    if (rst) begin
      foreach (hist[k]) hist[k] = 0;
      reset_cnt++;
    end else if (v) begin
      for (int k = TAPS - 1; k > 0; k--) hist[k] = hist[k-1];
      hist[0] = s;
      expected = 0;
      for (int k = 0; k < TAPS; k++) expected += int'(fir_coef[k]) * hist[k];
      sample_cnt++;
    end else begin
      stall_cnt++;
    end
    #1 check_add();
    @(posedge clk); #1;
    checks++;
    if (rst) begin
      if (fir_out_valid !== 1'b0) begin
        failures++;
        $display("FAIL out_valid set during reset");
      end
    end else if (fir_out_valid !== v) begin
      failures++;
      $display("FAIL fir out_valid=%b expected %b", fir_out_valid, v);
    end else if (v && fir_y !== 32'(expected)) begin
      failures++;
      $display("FAIL fir y=%0d expected %0d", fir_y, expected);
    end else if (v && expected < 0) begin
      neg_cnt++;
    end
  endtask

  initial begin
    logic [31:0] x, y;
    foreach (skip_cnt[i]) begin skip_cnt[i] = 0; bec_cnt[i] = 0; end
    foreach (hist[i]) hist[i] = 0;
    fir_coef = '{8'sd2, -8'sd3, 8'sd5, -8'sd7, 8'sd11};
    rst_n = 1'b0; fir_in_valid = 1'b0; fir_x = '0;
    drive_add('0, '0, 1'b0);
    cycle('0, '0, 1'b0, 1'b0, 0, 1'b1);

    // characterization vectors, alongside an impulse into the filter
    for (int t = 0; t < 5; t++) begin
      for (int k = 0; k < 32; k++) begin
        x[k] = pat_a(k)[4-t];
        y[k] = pat_b(k)[4-t];
      end
      cycle(x, y, 1'b0, 1'b1, (t == 0) ? 1 : 0, 1'b0);
      cycle(x, y, 1'b1, 1'b0, 0, 1'b0);
    end

    for (int i = 0; i < 4000; i++) begin
      x = $urandom;
      y = (i % 3 == 0) ? (~x ^ (32'd1 << ($urandom % 32))) : $urandom;
      if (i == 2000) foreach (fir_coef[k]) fir_coef[k] = 8'($urandom);
      cycle(x, y, 1'($urandom), ($urandom % 4) != 0, int'($signed(8'($urandom))), i == 1000);
    end

    for (int st = 0; st < CSKA_STAGES; st++) begin
      $display("slice %0d: carry-in 1 %0d times, skipped %0d times", st, bec_cnt[st],
               skip_cnt[st]);
      checks++;
      if (bec_cnt[st] == 0 || skip_cnt[st] == 0) begin
        failures++;
        $display("FAIL slice %0d mechanism never exercised", st);
      end
    end
    $display("filter: samples %0d, stalls %0d, resets %0d, negative outputs %0d",
             sample_cnt, stall_cnt, reset_cnt, neg_cnt);
    checks += 3;
    if (stall_cnt == 0) begin failures++; $display("FAIL no filter stall"); end
    if (reset_cnt < 2)  begin failures++; $display("FAIL no mid-stream reset"); end
    if (neg_cnt == 0)   begin failures++; $display("FAIL no negative filter output"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
