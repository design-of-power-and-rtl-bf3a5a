// One-bit full adder, the cell of the ripple-carry chains.
// sum = a ^ b ^ cin; cout = a&b | cin&(a^b). The propagate a ^ b is brought
// out as well, since the carry-skip logic needs it. Purely combinational.
module full_adder (
  input  logic a,
  input  logic b,
  input  logic cin,
  output logic sum,
  output logic cout,
  output logic prop
);
  assign prop = a ^ b;
  assign sum  = prop ^ cin;
  assign cout = (a & b) | (cin & prop);
endmodule
