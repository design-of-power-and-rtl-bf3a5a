// Top level: the 32-bit area-efficient carry skip adder on its own, as the
// arithmetic unit it is designed to be, next to the 5-tap FIR filter whose
// adder unit is built from the same adder. The two share no signals.
//
// Adder side: {add_cout, add_sum} = add_a + add_b + add_cin, combinational.
// Filter side: see fir_filter; one sample per clock, output one cycle after
// the sample is accepted.
module cska_fir_top
  import cska_pkg::*;
(
  input  logic [CSKA_WIDTH-1:0]         add_a,
  input  logic [CSKA_WIDTH-1:0]         add_b,
  input  logic                          add_cin,
  output logic [CSKA_WIDTH-1:0]         add_sum,
  output logic                          add_cout,

  input  logic                          clk,
  input  logic                          rst_n,
  input  logic                          fir_in_valid,
  input  logic signed [FIR_DATA_W-1:0]  fir_x,
  input  logic signed [FIR_COEF_W-1:0]  fir_coef [FIR_TAPS],
  output logic                          fir_out_valid,
  output logic signed [CSKA_WIDTH-1:0]  fir_y
);
  cska_adder u_adder (
    .a   (add_a),
    .b   (add_b),
    .cin (add_cin),
    .sum (add_sum),
    .cout(add_cout)
  );

  fir_filter u_fir (
    .clk      (clk),
    .rst_n    (rst_n),
    .in_valid (fir_in_valid),
    .x_in     (fir_x),
    .coef     (fir_coef),
    .out_valid(fir_out_valid),
    .y_out    (fir_y)
  );
endmodule
