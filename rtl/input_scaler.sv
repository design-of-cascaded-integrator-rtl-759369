// input_scaler -- input scaling and sign extension for the CIC filters.
//
// Each integrator stage of a CIC filter with rate change R has a DC gain of R,
// so the input is scaled by 1/R for every stage that has to be compensated.
// Here the scaling is exact: the sign-extended input is placed into the
// W-bit internal word so that its binary point sits SCALE_STAGES*log2(R)
// places below the integer part of the word, which has FRAC fraction bits.
// Nothing is lost, and the filter output read as a fixed-point number with
// FRAC fraction bits then has unity DC gain. A scaler at the filter input that
// compensates all integrator stages follows the design description; the
// exact fixed-point realisation is this design's own choice.
//
// Interface: x is an IN_WIDTH-bit two's complement sample, sel the rate-select
// code (log2 R, clamped to 1 .. RATE_BITS as in prog_decimator), y the scaled
// W-bit word y = x * 2^(FRAC - SCALE_STAGES*log2 R). Purely combinational.
module input_scaler #(
  parameter int unsigned IN_WIDTH     = cic_pkg::IN_WIDTH,
  parameter int unsigned RATE_BITS    = cic_pkg::RATE_BITS,
  parameter int unsigned SEL_WIDTH    = cic_pkg::SEL_WIDTH,
  parameter int unsigned SCALE_STAGES = cic_pkg::N_STAGES,
  parameter int unsigned FRAC         = cic_pkg::frac_bits(cic_pkg::N_STAGES, cic_pkg::RATE_BITS),
  parameter int unsigned W            = cic_pkg::word_width(cic_pkg::IN_WIDTH, cic_pkg::N_STAGES,
                                                            cic_pkg::RATE_BITS, cic_pkg::DIFF_DELAY)
) (
  input  logic signed [IN_WIDTH-1:0]  x,
  input  logic        [SEL_WIDTH-1:0] sel,
  output logic        [W-1:0]         y
);

  logic [SEL_WIDTH-1:0] k;
  logic [W-1:0]         x_ext;
  int unsigned          shift;

  always_comb begin
    if (sel < SEL_WIDTH'(1))              k = SEL_WIDTH'(1);
    else if (sel > SEL_WIDTH'(RATE_BITS)) k = SEL_WIDTH'(RATE_BITS);
    else                                  k = sel;
    shift = FRAC - SCALE_STAGES * 32'(k);
    x_ext = W'(x);                       // sign extension
    y     = x_ext << shift;
  end

  initial begin
    assert (SCALE_STAGES * RATE_BITS <= FRAC && IN_WIDTH + FRAC <= W)
      else $error("input_scaler: word too narrow for the scaling range");
  end

endmodule
