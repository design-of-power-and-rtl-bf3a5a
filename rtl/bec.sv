// WIDTH-bit binary to excess-1 code converter (BEC): x = b + 1 mod 2^WIDTH.
// It is the cheap replacement for the second (carry-in = 1) ripple adder of
// a carry-select stage: bit i flips exactly when all lower bits are 1, so
// x[0] = ~b[0] and x[i] = b[i] ^ (b[0] & ... & b[i-1]), an XOR per bit fed
// by a running AND chain. Purely combinational.
module bec #(
  parameter int unsigned WIDTH = 4
) (
  input  logic [WIDTH-1:0] b,
  output logic [WIDTH-1:0] x
);
  // all_ones[i] = AND of b[i-1:0]; all_ones[0] = 1
  logic [WIDTH-1:0] all_ones;

  assign all_ones[0] = 1'b1;
  for (genvar i = 1; i < WIDTH; i++) begin : g_and
    assign all_ones[i] = all_ones[i-1] & b[i-1];
  end

  assign x = b ^ all_ones;
endmodule
