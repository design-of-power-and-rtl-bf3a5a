// Area-efficient hybrid carry skip adder (default 32 bits).
//
// The operands are cut into NUM_STAGES slices, least significant first,
// with widths STAGE_W. Every slice except MID_STAGE is an rca_bec_stage: one
// ripple adder run with carry-in 0 plus a binary-to-excess-1 converter and a
// mux, so the slice's sum for either carry-in is ready before the carry
// arrives. Slice MID_STAGE, the widest, is a parallel prefix adder.
//
// Carries between slices: slice 0 (no skip cell) hands on the carry of its
// own mux, selected by cin. From slice 1 on, each slice's carry-out comes
// from a skip cell, gen | prop & carry_in, fed with the slice's group
// generate (its carry for carry-in 0) and group propagate. So a carry
// crosses a slice in one complex gate instead of rippling through it, and
// the slice sums wait only for their mux select. The skip cells alternate
// AOI (inverted carry out) and OAI (true carry out), starting with AOI at
// slice 1; an inverter restores the true carry wherever a mux select needs
// it. With the default 7 slices the last cell is an OAI and gives the true
// carry-out directly.
//
// The 32-bit width, the RCA+BEC+mux slices, the prefix middle slice and the
// AOI/OAI skip cells follow the design description; the slice widths
// 3,4,5,8,5,4,3 are this implementation's choice.
//
// Interface: {cout, sum} = a + b + cin. Purely combinational.
module cska_adder
  import cska_pkg::*;
#(
  parameter int unsigned WIDTH      = CSKA_WIDTH,
  parameter int unsigned NUM_STAGES = CSKA_STAGES,
  parameter int unsigned MID_STAGE  = CSKA_MID,
  parameter stage_w_t    STAGE_W    = CSKA_STAGE_W
) (
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  input  logic             cin,
  output logic [WIDTH-1:0] sum,
  output logic             cout
);
  // bit position of the least significant bit of slice s
  function automatic int unsigned slice_lsb(int unsigned s);
    int unsigned acc = 0;
    for (int unsigned k = 0; k < s; k++) acc += STAGE_W[k];
    return acc;
  endfunction

  // skip cells alternate AOI, OAI, ... from slice 1 on
  function automatic skip_kind_e kind_of(int unsigned s);
    return (s % 2 == 1) ? SKIP_AOI : SKIP_OAI;
  endfunction

  initial begin
    assert (slice_lsb(NUM_STAGES) == WIDTH)
      else $error("cska_adder: slice widths do not add up to WIDTH");
    assert (NUM_STAGES <= CSKA_MAX_STAGES)
      else $error("cska_adder: too many slices");
    assert (MID_STAGE > 0 && MID_STAGE < NUM_STAGES)
      else $error("cska_adder: MID_STAGE must be an inner slice");
  end

  logic [NUM_STAGES-1:0] carry;  // true-polarity carry out of each slice
  logic [NUM_STAGES-1:0] chain;  // skip cell output, in its own polarity

  for (genvar s = 0; s < NUM_STAGES; s++) begin : g_stage
    localparam int unsigned LSB = slice_lsb(s);
    localparam int unsigned W   = STAGE_W[s];

    logic c_in;        // true carry into this slice
    logic gen, prop;   // slice group generate / propagate
    logic mux_cout;

    if (s == 0) begin : g_cin0
      assign c_in = cin;
    end else begin : g_cinn
      assign c_in = carry[s-1];
    end

    if (s == MID_STAGE) begin : g_prefix
      prefix_adder #(.WIDTH(W)) u_pfx (
        .a       (a[LSB +: W]),
        .b       (b[LSB +: W]),
        .cin     (c_in),
        .sum     (sum[LSB +: W]),
        .grp_gen (gen),
        .grp_prop(prop)
      );
      assign mux_cout = 1'b0;  // the prefix slice has no mux carry
    end else begin : g_ripple
      rca_bec_stage #(.WIDTH(W)) u_rb (
        .a       (a[LSB +: W]),
        .b       (b[LSB +: W]),
        .cin     (c_in),
        .sum     (sum[LSB +: W]),
        .cout    (mux_cout),
        .grp_gen (gen),
        .grp_prop(prop)
      );
    end

    if (s == 0) begin : g_first
      assign chain[s] = mux_cout;
      assign carry[s] = mux_cout;
    end else if (kind_of(s) == SKIP_AOI) begin : g_aoi
      // previous carry arrives in true polarity; result is inverted
      skip_logic #(.KIND(SKIP_AOI)) u_skip (
        .gen (gen),
        .prop(prop),
        .cin (c_in),
        .cout(chain[s])
      );
      assign carry[s] = ~chain[s];
    end else begin : g_oai
      // previous AOI left an inverted carry; result is true polarity
      skip_logic #(.KIND(SKIP_OAI)) u_skip (
        .gen (~gen),
        .prop(~prop),
        .cin (~c_in),
        .cout(chain[s])
      );
      assign carry[s] = chain[s];
    end
  end

  assign cout = carry[NUM_STAGES-1];
endmodule
