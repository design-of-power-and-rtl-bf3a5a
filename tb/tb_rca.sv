// Self-checking testbench for rca: exhaustive at 3 bits (the stage width of
// the outer slices) and random at 9 bits, against a + b + cin and a ^ b.
module tb_rca;
  int checks = 0, failures = 0;

  logic [2:0] a3, b3, s3, p3;
  logic       ci3, co3;
  logic [8:0] a9, b9, s9, p9;
  logic       ci9, co9;

  rca #(.WIDTH(3)) dut3 (.a(a3), .b(b3), .cin(ci3), .sum(s3), .cout(co3), .prop(p3));
  rca #(.WIDTH(9)) dut9 (.a(a9), .b(b9), .cin(ci9), .sum(s9), .cout(co9), .prop(p9));

  initial begin : watchdog
    #1ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [3:0]  e3;
    logic [9:0]  e9;
    for (int v = 0; v < 128; v++) begin
      {ci3, a3, b3} = 7'(v);
      #1;
      e3 = {1'b0, a3} + {1'b0, b3} + {3'b0, ci3};
      checks++;
      if ({co3, s3} !== e3 || p3 !== (a3 ^ b3)) begin
        failures++;
        $display("FAIL rca3 a=%h b=%h cin=%b -> %b%h exp %h", a3, b3, ci3, co3, s3, e3);
      end
    end
    for (int v = 0; v < 2000; v++) begin
      a9 = 9'($urandom); b9 = 9'($urandom); ci9 = 1'($urandom);
      if (v == 0) begin a9 = '1; b9 = '0; ci9 = 1'b1; end  // full ripple
      #1;
      e9 = {1'b0, a9} + {1'b0, b9} + {9'b0, ci9};
      checks++;
      if ({co9, s9} !== e9 || p9 !== (a9 ^ b9)) begin
        failures++;
        $display("FAIL rca9 a=%h b=%h cin=%b -> %b%h exp %h", a9, b9, ci9, co9, s9, e9);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
