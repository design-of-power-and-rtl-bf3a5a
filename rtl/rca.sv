// WIDTH-bit ripple-carry adder: a chain of full adders, bit 0 first.
// {cout, sum} = a + b + cin. Also outputs the per-bit propagate terms
// prop[i] = a[i] ^ b[i], from which a skip stage forms its group propagate.
// Inside the carry-skip adder every RCA runs with cin = 0; the carry-in port
// is kept so the block is a general adder. Purely combinational; the
// worst-case path is WIDTH carry cells long.
module rca #(
  parameter int unsigned WIDTH = 3
) (
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  input  logic             cin,
  output logic [WIDTH-1:0] sum,
  output logic             cout,
  output logic [WIDTH-1:0] prop
);
  logic [WIDTH:0] c;

  assign c[0] = cin;

  for (genvar i = 0; i < WIDTH; i++) begin : g_fa
    full_adder u_fa (
      .a   (a[i]),
      .b   (b[i]),
      .cin (c[i]),
      .sum (sum[i]),
      .cout(c[i+1]),
      .prop(prop[i])
    );
  end

  assign cout = c[WIDTH];
endmodule
