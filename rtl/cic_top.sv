// cic_top -- CIC decimator and CIC interpolator side by side.
//
// The receive path of a PSK modem lowers the sample rate with the decimator;
// the transmit path shapes and raises it with the interpolator. Both filters
// share the clock fs and reset but have their own rate-select code, so they
// can run at different rate changes. They are independent: nothing is passed
// between them. Defaults: N = 3 stages, M = 1, R = 2^1 .. 2^6, 8-bit input,
// 26-bit internal word (18 fraction bits).
//
// Interface: dec_* ports belong to the decimator (one input per clock,
// dec_y_valid one cycle in R), int_* ports to the interpolator (input taken
// when int_x_ready is high, one output per clock). Timing as in
// cic_decimator and cic_interpolator.
module cic_top #(
  parameter int unsigned N         = cic_pkg::N_STAGES,
  parameter int unsigned M         = cic_pkg::DIFF_DELAY,
  parameter int unsigned IN_WIDTH  = cic_pkg::IN_WIDTH,
  parameter int unsigned RATE_BITS = cic_pkg::RATE_BITS,
  parameter int unsigned SEL_WIDTH = cic_pkg::SEL_WIDTH,
  localparam int unsigned FRAC     = cic_pkg::frac_bits(N, RATE_BITS),
  localparam int unsigned W        = cic_pkg::word_width(IN_WIDTH, N, RATE_BITS, M)
) (
  input  logic                       clk,
  input  logic                       rst_n,
  // decimator
  input  logic [SEL_WIDTH-1:0]       dec_sel,
  input  logic signed [IN_WIDTH-1:0] dec_x,
  output logic [W-1:0]               dec_y,
  output logic [W-FRAC-1:0]          dec_y_int,
  output logic                       dec_y_valid,
  output logic                       dec_rate_clk,
  // interpolator
  input  logic [SEL_WIDTH-1:0]       int_sel,
  input  logic signed [IN_WIDTH-1:0] int_x,
  output logic                       int_x_ready,
  output logic [W-1:0]               int_y,
  output logic [W-FRAC-1:0]          int_y_int,
  output logic                       int_rate_clk
);

  cic_decimator #(
    .N(N), .M(M), .IN_WIDTH(IN_WIDTH), .RATE_BITS(RATE_BITS), .SEL_WIDTH(SEL_WIDTH)
  ) u_dec (
    .clk(clk), .rst_n(rst_n), .sel(dec_sel), .x_in(dec_x),
    .y_out(dec_y), .y_int(dec_y_int), .y_valid(dec_y_valid), .rate_clk(dec_rate_clk)
  );

  cic_interpolator #(
    .N(N), .M(M), .IN_WIDTH(IN_WIDTH), .RATE_BITS(RATE_BITS), .SEL_WIDTH(SEL_WIDTH)
  ) u_int (
    .clk(clk), .rst_n(rst_n), .sel(int_sel), .x_in(int_x),
    .x_ready(int_x_ready), .y_out(int_y), .y_int(int_y_int), .rate_clk(int_rate_clk)
  );

endmodule
