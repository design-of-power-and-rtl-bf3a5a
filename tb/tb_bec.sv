// Self-checking testbench for bec: every input of the 4-bit converter and of
// a 9-bit one, against b + 1 modulo 2^WIDTH.
module tb_bec;
  int checks = 0, failures = 0;

  logic [3:0] b4, x4;
  logic [8:0] b9, x9;

  bec #(.WIDTH(4)) dut4 (.b(b4), .x(x4));
  bec #(.WIDTH(9)) dut9 (.b(b9), .x(x9));

  initial begin : watchdog
    #1ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 16; v++) begin
      b4 = 4'(v);
      #1;
      checks++;
      if (x4 !== 4'(v + 1)) begin
        failures++;
        $display("FAIL bec4 %h -> %h", b4, x4);
      end
    end
    for (int v = 0; v < 512; v++) begin
      b9 = 9'(v);
      #1;
      checks++;
      if (x9 !== 9'(v + 1)) begin
        failures++;
        $display("FAIL bec9 %h -> %h", b9, x9);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
