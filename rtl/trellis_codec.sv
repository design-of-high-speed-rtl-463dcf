// trellis_codec: encoder, channel error injection and Viterbi decoder.
//
// The top of the design. Message bits enter the rate-1/2 convolutional
// encoder; each two-bit code word passes an error-injection point (chan_err
// is XORed onto the code bits, modelling a binary symmetric channel), is
// mapped to received samples (a code bit becomes all-zero or all-one
// Q-bit samples) and is decoded by the Viterbi decoder. In an error-free
// or correctable channel the decoded stream equals the message stream.
//
// An encoder feeding the decoder as the top follows the original design;
// the error-injection input is this design's addition for testing.
//
// Interface: msg_valid/msg_bit, one message bit per cycle at most. chan_err
// is sampled in the cycle the code word appears on cw_valid/cw (one cycle
// after the message bit); enc_state is the encoder's register content. thresh is the T-algorithm threshold. dec_valid/
// dec_bit give the decoded stream: bit n appears when the encoder has
// been given TB_DEPTH+1 further bits; with one bit per cycle that is
// TB_DEPTH+3 cycles after msg_valid. active_states/pruned_states report the
// decoder's survivors per step. clear restarts the decoder trellis; the
// encoder is restarted with rst_n only, so clear should be used with a
// zero-flushed encoder (two zero bits bring it to S0).
module trellis_codec
  import vd_pkg::*;
#(
  parameter int unsigned Q        = 1,
  parameter int unsigned PM_W     = PM_W_DEF,
  parameter int unsigned BM_W     = BM_W_DEF,
  parameter int unsigned TB_DEPTH = 64
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     clear,
  input  logic                     msg_valid,
  input  logic                     msg_bit,
  input  logic [1:0]               chan_err,
  input  logic [PM_W-2:0]          thresh,
  output logic                     cw_valid,
  output cw_t                      cw,
  output state_t                   enc_state,
  output logic                     dec_valid,
  output logic                     dec_bit,
  output logic [$clog2(NS+1)-1:0]  active_states,
  output logic [$clog2(NS+1)-1:0]  pruned_states
);

  cw_t      rx_bits;
  logic [2*Q-1:0] rx;

  conv_encoder u_enc (
    .clk, .rst_n,
    .in_valid (msg_valid), .in_bit (msg_bit),
    .out_valid(cw_valid),  .out_cw (cw),
    .state    (enc_state)
  );

  always_comb begin
    rx_bits = cw ^ chan_err;
    rx      = {{Q{rx_bits[1]}}, {Q{rx_bits[0]}}};
  end

  viterbi_decoder #(.Q(Q), .PM_W(PM_W), .BM_W(BM_W), .TB_DEPTH(TB_DEPTH)) u_dec (
    .clk, .rst_n, .clear,
    .in_valid (cw_valid), .rx,
    .thresh,
    .out_valid(dec_valid), .out_bit(dec_bit),
    .active_states, .pruned_states
  );

endmodule
