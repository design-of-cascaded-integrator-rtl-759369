// cs_integrator -- recursive integrator stage in carry-save arithmetic.
//
// Computes y[n] = y[n-1] + x[n] with input and state both held in redundant
// carry-save form (value = s + c, mod 2^W). The input pair from the previous
// stage is registered first; two rows of full adders then add the registered
// input pair and the two state words, and the result is written back to the
// state registers. No carry propagates along the word, so the path between
// registers is two full-adder delays regardless of W. This structure follows
// the carry-save integrator of the design description. The adders there have
// inverted outputs; this version uses true-polarity adders, which gives the
// same arithmetic.
//
// Interface: in_s/in_c is the input in carry-save form, out_s/out_c the state
// (the integrator output) in carry-save form. The stage runs on every clock
// (the high sample rate fs). Synchronous active-low reset clears all four
// registers.
//
// Bit 0 of out_c is always zero (the adder rows' carry-in is not used here);
// it is kept so that every stage passes the same W-bit pair.
//
// Timing: out(t) = sum of in(tau) for tau <= t-2 (one cycle in the input
// register, one in the state register).
module cs_integrator #(
  parameter int unsigned W = 26
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [W-1:0] in_s,
  input  logic [W-1:0] in_c,
  output logic [W-1:0] out_s,
  output logic [W-1:0] out_c
);

  logic [W-1:0] in_rs, in_rc;     // input registers
  logic [W-1:0] st_s, st_c;       // state registers
  logic [W-1:0] s1, c1, s2, c2;   // adder row outputs

  // First row: registered input pair plus the sum half of the state.
  cs_adder_row #(.W(W)) u_row1 (
    .a(in_rs), .b(in_rc), .c(st_s), .cin(1'b0), .sum(s1), .carry(c1)
  );

  // Second row: adds the carry half of the state.
  cs_adder_row #(.W(W)) u_row2 (
    .a(s1), .b(c1), .c(st_c), .cin(1'b0), .sum(s2), .carry(c2)
  );

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      in_rs <= '0;
      in_rc <= '0;
      st_s  <= '0;
      st_c  <= '0;
    end else begin
      in_rs <= in_s;
      in_rc <= in_c;
      st_s  <= s2;
      st_c  <= c2;
    end
  end

  assign out_s = st_s;
  assign out_c = st_c;

endmodule
