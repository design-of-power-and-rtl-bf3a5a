// Self-checking testbench for skip_logic: all eight input combinations of an
// AOI cell (true inputs) and of an OAI cell (inverted inputs). In both, the
// output must be the complement, in input polarity, of gen | prop & cin.
module tb_skip_logic;
  import cska_pkg::*;
  int checks = 0, failures = 0;

  logic g, p, c, y_aoi, y_oai;

  skip_logic #(.KIND(SKIP_AOI)) dut_aoi (.gen(g),  .prop(p),  .cin(c),  .cout(y_aoi));
  skip_logic #(.KIND(SKIP_OAI)) dut_oai (.gen(~g), .prop(~p), .cin(~c), .cout(y_oai));

  initial begin : watchdog
    #1ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic carry;
    for (int v = 0; v < 8; v++) begin
      {g, p, c} = 3'(v);
      #1;
      carry = g | (p & c);
      checks += 2;
      if (y_aoi !== ~carry) begin
        failures++;
        $display("FAIL AOI g=%b p=%b c=%b -> %b", g, p, c, y_aoi);
      end
      if (y_oai !== carry) begin
        failures++;
        $display("FAIL OAI g=%b p=%b c=%b -> %b", g, p, c, y_oai);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
