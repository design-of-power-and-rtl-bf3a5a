// Self-checking testbench for cska_adder.
//  * Default 32-bit adder (slices 3,4,5 | 8 | 5,4,3): the five characterization
//    vectors (each operand bit follows a fixed 5-step pattern), corner cases
//    and random operands, all against a + b + cin.
//  * Two other configurations: 6 slices (the last skip cell is an AOI, so the
//    carry-out goes through the final inverter) and a 16-bit 5-slice adder.
// Per slice of the default adder it counts how often a carry skipped the
// slice (carry in = 1 and the slice propagates) and how often the BEC result
// was selected (carry in = 1); each must happen at least once.
module tb_cska_adder;
  import cska_pkg::*;
  int checks = 0, failures = 0;

  logic [31:0] a, b, s;
  logic        ci, co;
  logic [31:0] a6, b6, s6;
  logic        ci6, co6;
  logic [15:0] a16, b16, s16;
  logic        ci16, co16;

  cska_adder dut (.a(a), .b(b), .cin(ci), .sum(s), .cout(co));
  cska_adder #(.WIDTH(32), .NUM_STAGES(6), .MID_STAGE(2), .STAGE_W('{0: 4, 1: 4, 2: 8, 3: 8, 4: 4, 5: 4, default: 0}))
    dut6 (.a(a6), .b(b6), .cin(ci6), .sum(s6), .cout(co6));
  cska_adder #(.WIDTH(16), .NUM_STAGES(5), .MID_STAGE(2), .STAGE_W('{0: 2, 1: 3, 2: 6, 3: 3, 4: 2, default: 0}))
    dut16 (.a(a16), .b(b16), .cin(ci16), .sum(s16), .cout(co16));

  int skip_cnt [CSKA_STAGES];
  int bec_cnt  [CSKA_STAGES];

  // Operand bit patterns over five time steps, first step in the MSB.
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

  task automatic check32(input logic [31:0] x, input logic [31:0] y, input logic c);
    logic [32:0] e;
    logic [31:0] carries;
    int unsigned lsb;
    a = x; b = y; ci = c;
    #1;
    e = {1'b0, x} + {1'b0, y} + {32'b0, c};
    checks++;
    if ({co, s} !== e) begin
      failures++;
      if (failures < 10) $display("FAIL a=%h b=%h cin=%b -> %b_%h exp %h", x, y, c, co, s, e);
    end
    // carry into every bit position, from the reference sum
    carries = x ^ y ^ e[31:0];
    lsb = 0;
    for (int st = 0; st < CSKA_STAGES; st++) begin
      logic [31:0] mask;
      mask = ((32'd1 << CSKA_STAGE_W[st]) - 1) << lsb;
      if (carries[lsb]) begin
        bec_cnt[st]++;
        if (((x ^ y) & mask) == mask) skip_cnt[st]++;
      end
      lsb += CSKA_STAGE_W[st];
    end
  endtask

  task automatic check_alt(input logic [31:0] x, input logic [31:0] y, input logic c);
    logic [32:0] e;
    logic [16:0] e16;
    a6 = x; b6 = y; ci6 = c;
    a16 = x[15:0]; b16 = y[31:16]; ci16 = c;
    #1;
    e   = {1'b0, x} + {1'b0, y} + {32'b0, c};
    e16 = {1'b0, x[15:0]} + {1'b0, y[31:16]} + {16'b0, c};
    checks += 2;
    if ({co6, s6} !== e) begin
      failures++;
      if (failures < 10) $display("FAIL 6-slice a=%h b=%h cin=%b -> %b_%h", x, y, c, co6, s6);
    end
    if ({co16, s16} !== e16) begin
      failures++;
      if (failures < 10) $display("FAIL 16-bit a=%h b=%h cin=%b -> %b_%h", x[15:0], y[31:16],
                                  c, co16, s16);
    end
  endtask

  initial begin : watchdog
    #10ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] x, y;
    foreach (skip_cnt[i]) begin skip_cnt[i] = 0; bec_cnt[i] = 0; end

    // characterization vectors, with carry-in 0 and 1
    for (int t = 0; t < 5; t++) begin
      for (int k = 0; k < 32; k++) begin
        x[k] = pat_a(k)[4-t];
        y[k] = pat_b(k)[4-t];
      end
      $display("vector %0d: A=%h B=%h", t, x, y);
      check32(x, y, 1'b0);
      check32(x, y, 1'b1);
      check_alt(x, y, 1'b0);
    end

    // corner cases: full propagate, full generate, zero
    check32('1, '0, 1'b1);
    check32('1, '0, 1'b0);
    check32('1, '1, 1'b1);
    check32('0, '0, 1'b0);
    check32(32'h5555_5555, 32'hAAAA_AAAA, 1'b1);
    check32(32'h8000_0000, 32'h8000_0000, 1'b0);
    check_alt('1, '0, 1'b1);
    check_alt('1, '1, 1'b0);

    // propagate runs ending in every slice
    for (int k = 0; k < 32; k++) begin
      x = 32'hFFFF_FFFF >> k;
      check32(x, 32'd1, 1'b0);
      check32(x, 32'd0, 1'b1);
      check_alt(x, 32'd1 | (32'd1 << 16), 1'b0);
    end

    for (int i = 0; i < 20000; i++) begin
      x = $urandom;
      y = $urandom;
      if (i % 4 == 1) y = ~x ^ (32'd1 << ($urandom % 32));  // long propagate runs
      check32(x, y, 1'($urandom));
      check_alt(x, y, 1'($urandom));
    end

    for (int st = 0; st < CSKA_STAGES; st++) begin
      $display("slice %0d: carry-in 1 (BEC result) %0d times, skipped %0d times",
               st, bec_cnt[st], skip_cnt[st]);
      checks++;
      if (bec_cnt[st] == 0 || skip_cnt[st] == 0) begin
        failures++;
        $display("FAIL slice %0d mechanism never exercised", st);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
