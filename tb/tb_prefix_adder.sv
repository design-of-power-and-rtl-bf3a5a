// Self-checking testbench for prefix_adder: exhaustive at the default 8 bits
// (all a, b and carry-in) and at 5 bits (a width that is not a power of two).
// Checks the sum against a + b + cin, the group generate against the carry
// for carry-in 0, and the group propagate against (a ^ b) all ones.
module tb_prefix_adder;
  int checks = 0, failures = 0;

  logic [7:0] a8, b8, s8;
  logic       ci8, g8, p8;
  logic [4:0] a5, b5, s5;
  logic       ci5, g5, p5;

  prefix_adder dut8 (.a(a8), .b(b8), .cin(ci8), .sum(s8), .grp_gen(g8), .grp_prop(p8));
  prefix_adder #(.WIDTH(5)) dut5 (.a(a5), .b(b5), .cin(ci5), .sum(s5), .grp_gen(g5),
                                  .grp_prop(p5));

  initial begin : watchdog
    #10ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [8:0] e8, z8;
    logic [5:0] e5, z5;
    for (int v = 0; v < (1 << 17); v++) begin
      {ci8, a8, b8} = 17'(v);
      #1;
      e8 = {1'b0, a8} + {1'b0, b8} + {8'b0, ci8};
      z8 = {1'b0, a8} + {1'b0, b8};
      checks++;
      if (s8 !== e8[7:0] || g8 !== z8[8] || p8 !== ((a8 ^ b8) == 8'hff)) begin
        failures++;
        if (failures < 10)
          $display("FAIL w8 a=%h b=%h cin=%b -> %h g=%b p=%b", a8, b8, ci8, s8, g8, p8);
      end
    end
    for (int v = 0; v < (1 << 11); v++) begin
      {ci5, a5, b5} = 11'(v);
      #1;
      e5 = {1'b0, a5} + {1'b0, b5} + {5'b0, ci5};
      z5 = {1'b0, a5} + {1'b0, b5};
      checks++;
      if (s5 !== e5[4:0] || g5 !== z5[5] || p5 !== ((a5 ^ b5) == 5'h1f)) begin
        failures++;
        if (failures < 10)
          $display("FAIL w5 a=%h b=%h cin=%b -> %h g=%b p=%b", a5, b5, ci5, s5, g5, p5);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
