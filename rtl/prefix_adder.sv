// Middle stage of the carry skip adder: a WIDTH-bit parallel prefix adder.
//   Preprocessing : bit generate g = a & b and propagate p = a ^ b.
//   Prefix network: Kogge-Stone, ceil(log2(WIDTH)) levels; level l combines
//                   each position with the one 2^l below it,
//                   (G, P) o (G', P') = (G | P & G', P & P').
//                   After the last level G[j], P[j] cover bits j..0.
//   Postprocessing: carry into bit j is cin for j = 0 and
//                   G[j-1] | P[j-1] & cin otherwise; sum = p ^ carry.
// The group generate and propagate of the whole slice (G, P at the top bit)
// go to the skip cell after this stage. Purely combinational; depth is
// logarithmic in WIDTH. The Kogge-Stone topology is this implementation's
// choice: only a generic parallel prefix network is specified.
module prefix_adder #(
  parameter int unsigned WIDTH = 8
) (
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  input  logic             cin,
  output logic [WIDTH-1:0] sum,
  output logic             grp_gen,
  output logic             grp_prop
);
  localparam int unsigned LEVELS = (WIDTH > 1) ? $clog2(WIDTH) : 1;

  logic [WIDTH-1:0] gl [LEVELS+1];
  logic [WIDTH-1:0] pl [LEVELS+1];
  logic [WIDTH-1:0] p_bit;
  logic [WIDTH-1:0] carry;

  // preprocessing
  assign p_bit = a ^ b;
  assign gl[0] = a & b;
  assign pl[0] = p_bit;

  // prefix network
  for (genvar l = 0; l < LEVELS; l++) begin : g_lvl
    localparam int unsigned DIST = 1 << l;
    for (genvar j = 0; j < WIDTH; j++) begin : g_bit
      if (j >= DIST) begin : g_op
        assign gl[l+1][j] = gl[l][j] | (pl[l][j] & gl[l][j-DIST]);
        assign pl[l+1][j] = pl[l][j] & pl[l][j-DIST];
      end else begin : g_pass
        assign gl[l+1][j] = gl[l][j];
        assign pl[l+1][j] = pl[l][j];
      end
    end
  end

  // postprocessing
  assign carry[0] = cin;
  for (genvar j = 1; j < WIDTH; j++) begin : g_carry
    assign carry[j] = gl[LEVELS][j-1] | (pl[LEVELS][j-1] & cin);
  end

  assign sum      = p_bit ^ carry;
  assign grp_gen  = gl[LEVELS][WIDTH-1];
  assign grp_prop = pl[LEVELS][WIDTH-1];
endmodule
