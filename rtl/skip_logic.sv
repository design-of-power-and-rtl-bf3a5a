// Carry-skip cell between two adder stages. Logically
//   carry_out = gen | (prop & carry_in)
// where gen is the stage's own carry (its adder run with carry-in 0) and
// prop says the whole stage propagates. The incoming carry skips the stage's
// ripple chain whenever prop is set.
// The cell is one inverting complex gate, so the carry polarity flips at
// every cell:
//   SKIP_AOI: inputs true,     cout = ~(gen | prop & cin)      (inverted carry)
//   SKIP_OAI: inputs inverted, cout = ~(gen_n & (prop_n | cin_n)) (true carry)
// In both cases cout is the complement, in the input polarity, of the carry
// function above. The adder alternates AOI and OAI cells along the chain.
// Purely combinational.
module skip_logic
  import cska_pkg::*;
#(
  parameter skip_kind_e KIND = SKIP_AOI
) (
  input  logic gen,
  input  logic prop,
  input  logic cin,
  output logic cout
);
  if (KIND == SKIP_AOI) begin : g_aoi
    assign cout = ~(gen | (prop & cin));
  end else begin : g_oai
    assign cout = ~(gen & (prop | cin));
  end
endmodule
