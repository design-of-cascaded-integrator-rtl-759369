// cic_interpolator -- pipelined, programmable CIC interpolation filter.
//
// The mirror image of the decimator: N comb stages (differential delay M) at
// the low rate fs/R, a rate expander that inserts R-1 zeros after every
// sample, and N integrators at the high rate fs. The transfer function
// referred to fs is ((1 - z^-RM) / (1 - z^-1))^N; because only one in R
// samples entering the integrators is non-zero, the DC gain is (RM)^N / R.
// Combs and integrators are the same carry-save stages as in the decimator,
// with pipeline registers after every comb. The exchange of the two sections,
// the pipelined combs and the rate expansion follow the design description;
// its defaults N = 3, M = 1 and R = 2^1 .. 2^6 are used here as well.
//
// This design's own choices: the low-rate input is requested by a one-cycle
// strobe x_ready from prog_decimator (the sample on x_in is taken in that
// cycle); the input scaler divides by R^(N-1) so that, with M = 1, the output
// read with FRAC fraction bits has unity DC gain; comb stages run one fs cycle
// apart, and the zero-stuffer passes the last comb's result into the
// integrators in the single cycle after that comb has loaded it; a change of
// sel clears the whole filter for one cycle. The clear is needed because the
// integrators' state, built up at the old rate, would otherwise leave a wrong
// DC gain that never decays (the decimator has no such problem: its combs
// remove any leftover integrator state).
//
// Interface: sel = log2 R. x_in is sampled when x_ready is high. y_out is the
// W-bit result, one per clock; y_int = y_out[W-1:FRAC]. rate_clk is the
// divided clock fs/R. Synchronous active-low reset.
//
// Timing: if x_ready is high in cycle t, the low-rate comb result of that
// sample enters the integrators as u[t+N] (u is zero in all other cycles).
// With ideal integrators I_N over u, y_out in cycle c equals I_N[c - 2N - 1].
// If sel differs in cycle t from its value in cycle t-1, every register is
// cleared at the end of cycle t, exactly as by a reset ending in cycle t (a
// sample offered with x_ready in that cycle is dropped).
module cic_interpolator #(
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
  output logic                       x_ready,
  output logic [W-1:0]               y_out,
  output logic [W-FRAC-1:0]          y_int,
  output logic                       rate_clk
);

  logic         rate_en;
  logic [W-1:0] x_scaled;
  logic [W-1:0] cmb_s [N+1];      // comb chain, [0] is the scaled input
  logic [W-1:0] cmb_c [N+1];
  logic [W-1:0] int_s [N+1];      // integrator chain, [0] is the expanded input
  logic [W-1:0] int_c [N+1];
  logic [N:0]   en_d;             // comb enables; en_d[N] marks the stuffer slot
  logic [SEL_WIDTH-1:0] sel_q;    // select code of the previous cycle
  logic         clr_n;            // reset or rate change, active low

  always_ff @(posedge clk) begin
    sel_q <= sel;
  end

  assign clr_n = rst_n && (sel == sel_q);

  prog_decimator #(.RATE_BITS(RATE_BITS), .SEL_WIDTH(SEL_WIDTH)) u_rate (
    .clk(clk), .rst_n(clr_n), .sel(sel), .rate_clk(rate_clk), .rate_en(rate_en)
  );

  assign x_ready = rate_en;

  input_scaler #(
    .IN_WIDTH(IN_WIDTH), .RATE_BITS(RATE_BITS), .SEL_WIDTH(SEL_WIDTH),
    .SCALE_STAGES(N-1), .FRAC(FRAC), .W(W)
  ) u_scale (
    .x(x_in), .sel(sel), .y(x_scaled)
  );

  assign cmb_s[0] = x_scaled;
  assign cmb_c[0] = '0;
  assign en_d[0]  = rate_en;

  always_ff @(posedge clk) begin
    if (!clr_n) en_d[N:1] <= '0;
    else        en_d[N:1] <= en_d[N-1:0];
  end

  for (genvar i = 1; i <= N; i++) begin : g_comb
    cs_comb #(.W(W), .M(M)) u_comb (
      .clk(clk), .rst_n(clr_n), .en(en_d[i-1]),
      .in_s(cmb_s[i-1]), .in_c(cmb_c[i-1]),
      .out_s(cmb_s[i]),  .out_c(cmb_c[i])
    );
  end

  // Rate expander: the comb result once, zeros in the other R-1 cycles.
  assign int_s[0] = en_d[N] ? cmb_s[N] : '0;
  assign int_c[0] = en_d[N] ? cmb_c[N] : '0;

  for (genvar i = 1; i <= N; i++) begin : g_int
    cs_integrator #(.W(W)) u_int (
      .clk(clk), .rst_n(clr_n),
      .in_s(int_s[i-1]), .in_c(int_c[i-1]),
      .out_s(int_s[i]),  .out_c(int_c[i])
    );
  end

  // Carry-save to binary conversion of the last integrator.
  always_ff @(posedge clk) begin
    if (!clr_n) y_out <= '0;
    else        y_out <= int_s[N] + int_c[N];
  end

  assign y_int = y_out[W-1:FRAC];

endmodule
