// One ripple stage of the carry skip adder, carry-select style with a BEC.
// An M-bit RCA adds the slices with carry-in 0, giving {c0, s0}. An
// (M+1)-bit binary-to-excess-1 converter forms {c0, s0} + 1, which is the
// result the stage would have with carry-in 1. A 2:1 mux selected by the
// incoming carry picks one of the two as {cout, sum}: only one adder is
// needed instead of two.
// For the skip logic the stage also exports grp_gen = c0 (the carry the
// stage makes on its own) and grp_prop = AND of its propagate bits (the
// stage passes an incoming carry straight through).
// The mux carry cout is used by the first stage, which has no skip cell.
// Purely combinational; cin only drives the mux select.
module rca_bec_stage #(
  parameter int unsigned WIDTH = 3
) (
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  input  logic             cin,
  output logic [WIDTH-1:0] sum,
  output logic             cout,
  output logic             grp_gen,
  output logic             grp_prop
);
  logic [WIDTH-1:0] s0;
  logic             c0;
  logic [WIDTH-1:0] prop;
  logic [WIDTH:0]   inc;

  rca #(.WIDTH(WIDTH)) u_rca (
    .a   (a),
    .b   (b),
    .cin (1'b0),
    .sum (s0),
    .cout(c0),
    .prop(prop)
  );

  bec #(.WIDTH(WIDTH + 1)) u_bec (
    .b({c0, s0}),
    .x(inc)
  );

  assign {cout, sum} = cin ? inc : {c0, s0};
  assign grp_gen     = c0;
  assign grp_prop    = &prop;
endmodule
