// conv_encoder: rate-1/2, four-state convolutional encoder.
//
// A two-stage shift register holds the last two message bits; each message
// bit accepted with in_valid produces one two-bit code word from XORs of the
// current bit and selected register stages (a Mealy machine: the output is a
// function of the state and the current input). The taps are vd_pkg::G1 and
// vd_pkg::G0, the (7,5) octal code, which is this design's choice.
//
// Interface: in_valid/in_bit carry one message bit per cycle; out_valid and
// out_cw carry the code word one cycle later (registered output), and
// state gives the present register content (S0..S3). rst_n clears the
// register to S0, as the decoder assumes the trellis starts in S0.
module conv_encoder
  import vd_pkg::*;
(
  input  logic   clk,
  input  logic   rst_n,
  input  logic   in_valid,
  input  logic   in_bit,
  output logic   out_valid,
  output cw_t    out_cw,
  output state_t state
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= '0;
      out_valid <= 1'b0;
      out_cw    <= '0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) begin
        out_cw <= codeword(state, in_bit);
        state  <= next_state(state, in_bit);
      end
    end
  end

endmodule
