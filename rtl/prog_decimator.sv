// prog_decimator -- programmable power-of-two rate generator.
//
// A counter built from half adders in carry-save form: stage 1 adds the
// constant 1 to its sum bit s1, and every later stage adds the registered
// carry of the stage before it to its own sum bit. Both the sum and the carry
// of every stage are registered, so no carry ever ripples and the clock period
// is one half-adder delay whatever the length. Sum bit s_k is a square wave of
// period 2^k clock cycles (its phase trails a binary counter by k-1 cycles).
// A multiplexer, steered by the rate-select code, picks one of s_1 .. s_K as
// the divided rate clock. The counter structure, the taps 2^1 .. 2^N and the
// mode-select multiplexer follow the design description.
//
// This design's own choices: the rate-select code sel is log2(R) itself
// (sel = 1 .. RATE_BITS gives R = 2 .. 2^RATE_BITS; 0 is treated as 1 and codes
// above RATE_BITS as RATE_BITS). Besides the divided clock the block gives a
// one-cycle enable, rate_en, on each rising edge of the selected clock, so
// that the comb section can run in the same clock domain as the integrators.
//
// Interface: clk is the high-rate clock fs. rate_clk has frequency fs/R and
// 50 % duty; rate_en is high for one cycle in every R. Synchronous active-low
// reset clears the counter. After a change of sel the first period may be
// shorter or longer; the next ones are exact.
module prog_decimator #(
  parameter int unsigned RATE_BITS = cic_pkg::RATE_BITS,
  parameter int unsigned SEL_WIDTH = cic_pkg::SEL_WIDTH
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic [SEL_WIDTH-1:0] sel,
  output logic                 rate_clk,
  output logic                 rate_en
);

  logic [RATE_BITS:1] s_q;        // sum bits, s_q[k] has period 2^k
  logic [RATE_BITS:1] c_q;        // registered carries
  logic [RATE_BITS:1] cin;        // carry into each stage
  logic [SEL_WIDTH-1:0] k;        // clamped select code
  logic                 rate_clk_q;

  always_comb begin
    cin[1] = 1'b1;
    for (int i = 2; i <= RATE_BITS; i++) cin[i] = c_q[i-1];
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      s_q <= '0;
      c_q <= '0;
    end else begin
      s_q <= s_q ^ cin;
      c_q <= s_q & cin;
    end
  end

  // Mode-select multiplexer.
  always_comb begin
    if (sel < SEL_WIDTH'(1))              k = SEL_WIDTH'(1);
    else if (sel > SEL_WIDTH'(RATE_BITS)) k = SEL_WIDTH'(RATE_BITS);
    else                                  k = sel;
    rate_clk = s_q[k];
  end

  always_ff @(posedge clk) begin
    if (!rst_n) rate_clk_q <= 1'b0;
    else        rate_clk_q <= rate_clk;
  end

  assign rate_en = rate_clk & ~rate_clk_q;

  initial begin
    assert (RATE_BITS >= 1 && RATE_BITS < (1 << SEL_WIDTH))
      else $error("prog_decimator: RATE_BITS must fit the select code");
  end

endmodule
