// cic_pkg -- constants and word-length rules shared by the CIC filter modules.
//
// The default configuration is a three-stage CIC filter (N = 3) with a
// differential delay of one (M = 1) and a rate change that is programmable in
// powers of two from 2^1 to 2^6. These three numbers follow the design
// description. The 8-bit signed input is this design's own choice; it is the
// smallest two's complement word that holds the step amplitude of 127 used to
// exercise the filter.
//
// Word length. The gain of the filter is (R*M)^N, so the internal word needs
// B_out = B_in + N*log2(R*M) bits. Here every stage carries the same B_out-bit
// word, organised as a fixed-point number: IN_WIDTH + N*log2(M) integer bits
// and N*RATE_BITS fraction bits. The input scaler places the input sample
// N*log2(R) bits below the integer part (a division by R per integrator), so
// the DC gain of the whole filter is one and the integer part of the result
// has the range of the input.
package cic_pkg;

  // Design defaults.
  localparam int unsigned N_STAGES   = 3;  // integrator / comb stages
  localparam int unsigned DIFF_DELAY = 1;  // M, 1 or 2
  localparam int unsigned IN_WIDTH   = 8;  // input sample width (two's complement)
  localparam int unsigned RATE_BITS  = 6;  // R = 2^1 .. 2^RATE_BITS
  localparam int unsigned SEL_WIDTH  = 3;  // width of the rate-select code

  // log2 of the differential delay (M is 1 or 2).
  function automatic int unsigned log2_m(input int unsigned m);
    return (m > 1) ? 1 : 0;
  endfunction

  // Number of fraction bits: room for the largest 1/R^N input scaling.
  function automatic int unsigned frac_bits(input int unsigned n, input int unsigned rate_bits);
    return n * rate_bits;
  endfunction

  // Full internal word: B_out = B_in + N*log2(R_max*M).
  function automatic int unsigned word_width(input int unsigned in_w, input int unsigned n,
                                             input int unsigned rate_bits, input int unsigned m);
    return in_w + n * (rate_bits + log2_m(m));
  endfunction

endpackage
