// cic_decimator -- pipelined, programmable CIC decimation filter.
//
// N integrators at the input rate fs, a rate change by R = 2^sel, and N comb
// stages (differential delay M) at fs/R. The transfer function referred to
// the input rate is H(z) = ((1 - z^-RM) / (1 - z^-1))^N with DC gain (RM)^N.
// All adders work in carry-save form (see cs_integrator and cs_comb), so the
// path between registers is two full-adder delays whatever the word length;
// a single carry-propagate adder converts the last comb's result to binary.
// The structure (integrators, resampling switch, pipelined combs, carry-save
// arithmetic, programmable power-of-two decimator, input scaler, word length
// B_in + N*log2(RM)) follows the design description, as do the defaults
// N = 3, M = 1 and R = 2^1 .. 2^6.
//
// This design's own choices: the resampling switch is a clock enable from
// prog_decimator, not a second clock; comb stage k runs one fs cycle after
// stage k-1 (its enable is delayed by one register per stage), so the comb
// pipeline registers add one fs cycle each instead of one low-rate sample;
// the carry-save to binary conversion is a registered ripple adder.
//
// Interface: one input sample x_in per clock. sel = log2 R (1 .. RATE_BITS).
// y_out is the full W-bit result; read as a fixed-point number with FRAC
// fraction bits it has unity DC gain, so y_int = y_out[W-1:FRAC] is the
// result in the input's range (with N*log2 M extra integer bits). y_valid is
// high for one cycle in every R, in the cycle that y_out holds a new result.
// rate_clk is the divided clock fs/R. Synchronous active-low reset.
//
// Timing: with ideal integrators I_N[n] over the scaled inputs x_s[n]
// (sample n presented in cycle n), the result shown while y_valid is high in
// cycle t is comb^N applied to I_N at n = t - LATENCY, LATENCY = 3N + 1
// (2 cycles per integrator, 1 per comb, 1 for the final adder). After a
// change of sel the first N+1 results are transients; a reset clears them.
module cic_decimator #(
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
  input  logic [SEL_WIDTH-1:0]       sel,
  input  logic signed [IN_WIDTH-1:0] x_in,
  output logic [W-1:0]               y_out,
  output logic [W-FRAC-1:0]          y_int,
  output logic                       y_valid,
  output logic                       rate_clk
);

  logic         rate_en;
  logic [W-1:0] x_scaled;
  logic [W-1:0] int_s [N+1];      // integrator chain, [0] is the input
  logic [W-1:0] int_c [N+1];
  logic [W-1:0] cmb_s [N+1];      // comb chain, [0] is the resampled input
  logic [W-1:0] cmb_c [N+1];
  logic [N:0]   en_d;             // comb enables, one cycle apart

  prog_decimator #(.RATE_BITS(RATE_BITS), .SEL_WIDTH(SEL_WIDTH)) u_rate (
    .clk(clk), .rst_n(rst_n), .sel(sel), .rate_clk(rate_clk), .rate_en(rate_en)
  );

  input_scaler #(
    .IN_WIDTH(IN_WIDTH), .RATE_BITS(RATE_BITS), .SEL_WIDTH(SEL_WIDTH),
    .SCALE_STAGES(N), .FRAC(FRAC), .W(W)
  ) u_scale (
    .x(x_in), .sel(sel), .y(x_scaled)
  );

  assign int_s[0] = x_scaled;
  assign int_c[0] = '0;

  for (genvar i = 1; i <= N; i++) begin : g_int
    cs_integrator #(.W(W)) u_int (
      .clk(clk), .rst_n(rst_n),
      .in_s(int_s[i-1]), .in_c(int_c[i-1]),
      .out_s(int_s[i]),  .out_c(int_c[i])
    );
  end

  // Resampling switch: the comb section reads the last integrator only on
  // enabled cycles.
  assign cmb_s[0] = int_s[N];
  assign cmb_c[0] = int_c[N];

  always_ff @(posedge clk) begin
    if (!rst_n) en_d[N:1] <= '0;
    else        en_d[N:1] <= en_d[N-1:0];
  end
  assign en_d[0] = rate_en;

  for (genvar i = 1; i <= N; i++) begin : g_comb
    cs_comb #(.W(W), .M(M)) u_comb (
      .clk(clk), .rst_n(rst_n), .en(en_d[i-1]),
      .in_s(cmb_s[i-1]), .in_c(cmb_c[i-1]),
      .out_s(cmb_s[i]),  .out_c(cmb_c[i])
    );
  end

  // Carry-save to binary conversion of the last comb.
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      y_out   <= '0;
      y_valid <= 1'b0;
    end else begin
      y_valid <= en_d[N];
      if (en_d[N]) y_out <= cmb_s[N] + cmb_c[N];
    end
  end

  assign y_int = y_out[W-1:FRAC];

endmodule
