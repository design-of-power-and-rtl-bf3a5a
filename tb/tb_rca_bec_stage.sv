// Self-checking testbench for rca_bec_stage: exhaustive at 3 and 5 bits.
// Checks the selected sum and carry against a + b + cin, and the group
// generate (carry for carry-in 0) and group propagate (a ^ b all ones).
module tb_rca_bec_stage;
  int checks = 0, failures = 0;

  logic [2:0] a3, b3, s3;
  logic       ci3, co3, g3, p3;
  logic [4:0] a5, b5, s5;
  logic       ci5, co5, g5, p5;

  rca_bec_stage #(.WIDTH(3)) dut3 (.a(a3), .b(b3), .cin(ci3), .sum(s3), .cout(co3),
                                   .grp_gen(g3), .grp_prop(p3));
  rca_bec_stage #(.WIDTH(5)) dut5 (.a(a5), .b(b5), .cin(ci5), .sum(s5), .cout(co5),
                                   .grp_gen(g5), .grp_prop(p5));

  initial begin : watchdog
    #1ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [3:0] e3;
    logic [5:0] e5;
    for (int v = 0; v < 128; v++) begin
      {ci3, a3, b3} = 7'(v);
      #1;
      e3 = {1'b0, a3} + {1'b0, b3} + {3'b0, ci3};
      checks++;
      if ({co3, s3} !== e3 || g3 !== 1'(4'({1'b0, a3} + {1'b0, b3}) >> 3) ||
          p3 !== ((a3 ^ b3) == 3'b111)) begin
        failures++;
        $display("FAIL w3 a=%h b=%h cin=%b -> %b%h g=%b p=%b", a3, b3, ci3, co3, s3, g3, p3);
      end
    end
    for (int v = 0; v < 2048; v++) begin
      {ci5, a5, b5} = 11'(v);
      #1;
      e5 = {1'b0, a5} + {1'b0, b5} + {5'b0, ci5};
      checks++;
      if ({co5, s5} !== e5 || g5 !== 1'(6'({1'b0, a5} + {1'b0, b5}) >> 5) ||
          p5 !== ((a5 ^ b5) == 5'b11111)) begin
        failures++;
        $display("FAIL w5 a=%h b=%h cin=%b -> %b%h g=%b p=%b", a5, b5, ci5, co5, s5, g5, p5);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
