// vd_pkg: trellis constants and helper functions shared by the rate-1/2
// Viterbi decoder and its encoder.
//
// The code is a rate-1/2, constraint-length-3 (two memory elements, four
// states S0..S3) convolutional code. The state is the content of the two
// encoder flip-flops, {s1, s0}, where s1 (the left-most register, taken as
// the MSB) holds the most recent input bit. On input u the next state is
// {u, s1}. The two code bits are c1 = g1 . {u,s1,s0} and c0 = g0 . {u,s1,s0}
// (parity of the masked bits), packed as code word {c1, c0}.
//
// The generator taps are this design's choice, because the encoder figure
// is not reproduced in text: the standard (7,5) octal pair, free distance 5.
//
// Trellis structure used by the decoder: the two predecessors of state
// {a, b} are {b, 0} (the "upper" one, decision bit 0) and {b, 1} (the
// "lower" one, decision bit 1); the input bit that leads into state {a, b}
// is a, its MSB.
package vd_pkg;

  localparam int unsigned K       = 3;          // constraint length
  localparam int unsigned M       = K - 1;      // encoder memory (flip-flops)
  localparam int unsigned NS      = 1 << M;     // number of trellis states
  localparam int unsigned NCW     = 4;          // code words of a rate-1/2 code

  localparam logic [K-1:0] G1 = 3'b111;         // generator of code bit c1 (7 octal)
  localparam logic [K-1:0] G0 = 3'b101;         // generator of code bit c0 (5 octal)

  // Default widths of the decoder: 7 bits of state-metric resolution plus
  // one extra bit for modulo normalisation, 5-bit branch metrics.
  localparam int unsigned PM_W_DEF = 8;
  localparam int unsigned BM_W_DEF = 5;

  typedef logic [M-1:0] state_t;
  typedef logic [1:0]   cw_t;

  // Code word emitted when input u is applied in state s.
  function automatic cw_t codeword(state_t s, logic u);
    logic [K-1:0] reg_bits;
    reg_bits = {u, s};
    return {^(reg_bits & G1), ^(reg_bits & G0)};
  endfunction

  // State reached from state s on input u.
  function automatic state_t next_state(state_t s, logic u);
    return {u, s[M-1:1]};
  endfunction

  // Predecessor of state s selected by decision bit d (0 = upper).
  function automatic state_t prev_state(state_t s, logic d);
    return {s[M-2:0], d};
  endfunction

endpackage
