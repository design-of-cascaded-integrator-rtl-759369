// cs_adder_row -- one row of full adders used as a 3:2 carry-save compressor.
//
// Three W-bit words a, b and c go in; a sum word and a carry word come out
// with sum + carry == a + b + c (mod 2^W). The carry word is returned already
// weighted, that is shifted one place to the left, and its free least
// significant bit carries cin. No carry ripples between bit positions, so the
// delay is that of a single full adder whatever W is. The carry out of the most
// significant bit is dropped: all CIC arithmetic is modulo 2^W.
//
// Purely combinational. The design description builds its integrators and
// combs from such rows; the separate helper module is this design's own
// packaging.
module cs_adder_row #(
  parameter int unsigned W = 8
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic [W-1:0] c,
  input  logic         cin,
  output logic [W-1:0] sum,
  output logic [W-1:0] carry
);

  logic [W-2:0] maj;              // carries out of bits 0 .. W-2

  always_comb begin
    sum   = a ^ b ^ c;
    maj   = (a[W-2:0] & b[W-2:0]) | (a[W-2:0] & c[W-2:0]) | (b[W-2:0] & c[W-2:0]);
    carry = {maj, cin};
  end

endmodule
