// cs_comb -- comb (differentiator) stage in carry-save arithmetic.
//
// Computes y[m] = x[m] - x[m-M] at the low sample rate, with input, delay line
// and output all in carry-save form (value = s + c, mod 2^W). The subtraction
// adds the bitwise complement of both delayed words; the two +1 terms that
// complete the two's complement negations enter through the free carry-in
// bits of the two adder rows. The result goes into the output pipeline
// registers, which break the adder chain between consecutive comb stages.
// This follows the carry-save comb of the design description (two full-adder
// delays per stage, pipeline registers at the output); true-polarity adders
// are used instead of adders with inverted outputs.
//
// Interface: in_s/in_c input pair, out_s/out_c registered output pair. en
// marks the clock cycles that carry a low-rate sample: the delay line and the
// output registers only load when en is high. M (differential delay) is 1 or 2.
// Synchronous active-low reset clears the delay line and the output.
//
// Timing: if en is high in cycle t, out(t+1) = in(t) - (input at the M-th
// previous enabled cycle).
module cs_comb #(
  parameter int unsigned W = 26,
  parameter int unsigned M = 1
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         en,
  input  logic [W-1:0] in_s,
  input  logic [W-1:0] in_c,
  output logic [W-1:0] out_s,
  output logic [W-1:0] out_c
);

  logic [W-1:0] dly_s [M];        // delay line, sum half
  logic [W-1:0] dly_c [M];        // delay line, carry half
  logic [W-1:0] s1, c1, s2, c2;

  // in - d = in_s + in_c + ~d_s + 1 + ~d_c + 1
  cs_adder_row #(.W(W)) u_row1 (
    .a(in_s), .b(in_c), .c(~dly_s[M-1]), .cin(1'b1), .sum(s1), .carry(c1)
  );

  cs_adder_row #(.W(W)) u_row2 (
    .a(s1), .b(c1), .c(~dly_c[M-1]), .cin(1'b1), .sum(s2), .carry(c2)
  );

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int i = 0; i < M; i++) begin
        dly_s[i] <= '0;
        dly_c[i] <= '0;
      end
      out_s <= '0;
      out_c <= '0;
    end else if (en) begin
      dly_s[0] <= in_s;
      dly_c[0] <= in_c;
      for (int i = 1; i < M; i++) begin
        dly_s[i] <= dly_s[i-1];
        dly_c[i] <= dly_c[i-1];
      end
      out_s <= s2;
      out_c <= c2;
    end
  end

  initial begin
    assert (M == 1 || M == 2)
      else $error("cs_comb: differential delay M must be 1 or 2");
  end

endmodule
