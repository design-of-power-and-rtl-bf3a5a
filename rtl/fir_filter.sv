// 5-tap direct-form FIR filter whose adder unit is the carry skip adder.
//
//   y[n] = h0*x[n] + h1*x[n-1] + h2*x[n-2] + h3*x[n-3] + h4*x[n-4]
//
// A delay line holds the last TAPS-1 accepted samples. Each tap product
// (signed DATA_W x COEF_W) is sign-extended to ACC_W bits, and the products
// are summed by a chain of TAPS-1 cska_adder instances (carry-in 0, carry-out
// dropped: two's-complement sum modulo 2^ACC_W).
//
// Interface and timing: when in_valid is high at a rising clock edge, x_in is
// taken as x[n], the delay line shifts, and y_out is loaded with y[n];
// out_valid is high in the following cycle (latency 1 cycle, one sample per
// clock). Coefficients coef[k] = h_k are inputs and must be stable while
// samples are accepted. rst_n is a synchronous active-low reset that clears
// the delay line, y_out and out_valid.
//
// The tap count and the use of the carry skip adder for the additions follow
// the design description. Direct form, the widths, the '*' multipliers, the
// coefficient ports, the handshake and the reset are this implementation's
// choices.
module fir_filter
  import cska_pkg::*;
#(
  parameter int unsigned TAPS   = FIR_TAPS,
  parameter int unsigned DATA_W = FIR_DATA_W,
  parameter int unsigned COEF_W = FIR_COEF_W,
  parameter int unsigned ACC_W  = CSKA_WIDTH
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     in_valid,
  input  logic signed [DATA_W-1:0] x_in,
  input  logic signed [COEF_W-1:0] coef [TAPS],
  output logic                     out_valid,
  output logic signed [ACC_W-1:0]  y_out
);
  localparam int unsigned PROD_W = DATA_W + COEF_W;

  logic signed [DATA_W-1:0] dly  [TAPS];  // dly[0] = x_in, dly[k] = x[n-k]
  logic signed [PROD_W-1:0] prod [TAPS];
  logic        [ACC_W-1:0]  term [TAPS];
  logic        [ACC_W-1:0]  psum [TAPS];  // psum[k] = term[0] + ... + term[k]

  assign dly[0] = x_in;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int k = 1; k < TAPS; k++) dly[k] <= '0;
    end else if (in_valid) begin
      for (int k = 1; k < TAPS; k++) dly[k] <= dly[k-1];
    end
  end

  for (genvar k = 0; k < TAPS; k++) begin : g_tap
    assign prod[k] = dly[k] * coef[k];
    assign term[k] = ACC_W'(prod[k]);   // sign extension (prod is signed)
  end

  assign psum[0] = term[0];
  for (genvar k = 1; k < TAPS; k++) begin : g_add
    logic unused_cout;
    cska_adder u_add (
      .a   (psum[k-1]),
      .b   (term[k]),
      .cin (1'b0),
      .sum (psum[k]),
      .cout(unused_cout)
    );
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      y_out     <= '0;
      out_valid <= 1'b0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) y_out <= psum[TAPS-1];
    end
  end
endmodule
