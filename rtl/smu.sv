// smu: survivor path unit (trace-back).
//
// Stores the decision bits of the path metric unit and traces the survivor
// path back through them to produce decoded bits. Every trellis step n it
// starts from the best state of that step and follows the decision bits of
// steps n, n-1, ..., n-D+1 (D = TB_DEPTH, the survivor path length) back to
// the state of step n-D. Beyond that depth all survivor paths have merged
// with high probability, so the MSB of that state, which is the message bit
// that drove the encoder into it, is output as the decoded bit of step n-D.
//
// The decisions of the D-1 previous steps live in a circular buffer
// (one NS-bit word per step); the decision word of step n is used straight
// from the input and written to the buffer on the same strobe, so no word
// is ever shifted. The trace-back itself is a chain of D 4:1 selections
// evaluated in one cycle, giving one decoded bit per step.
//
// A trace-back survivor unit is what the original design uses; the depth
// of 64 follows its 64-bit sizing, and the circular buffer with a full
// combinational trace every step is this design's choice.
//
// Timing: on a cycle with step high, out_valid/out_bit are updated at the
// next edge with the bit of step n-D; out_valid stays low for the first D
// steps after reset or clear.
module smu
  import vd_pkg::*;
#(
  parameter int unsigned TB_DEPTH = 64
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          clear,
  input  logic          step,
  input  logic [NS-1:0] dec,
  input  state_t        best,
  output logic          out_valid,
  output logic          out_bit
);

  localparam int unsigned MEM = TB_DEPTH - 1;   // stored decision words
  localparam int unsigned AW  = (MEM > 1) ? $clog2(MEM) : 1;
  localparam int unsigned CW  = $clog2(TB_DEPTH + 2);

  initial assert (TB_DEPTH >= 2) else $error("smu: TB_DEPTH must be at least 2");

  logic [NS-1:0] mem [MEM];
  logic [AW-1:0] wp;                 // next write slot; wp-1 holds step n-1
  logic [CW-1:0] fill;               // steps seen, saturating at TB_DEPTH+1

  // Combinational trace-back from the best state of the current step.
  state_t        trace;
  logic [AW:0]   idx;

  always_comb begin
    trace = prev_state(best, dec[best]);            // state of step n-1
    idx   = '0;
    for (int unsigned k = 1; k < TB_DEPTH; k++) begin
      idx   = ({1'b0, wp} + (AW+1)'(MEM) - (AW+1)'(k));
      if (idx >= (AW+1)'(MEM)) idx = idx - (AW+1)'(MEM);
      trace = prev_state(trace, mem[idx[AW-1:0]][trace]);
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wp        <= '0;
      fill      <= '0;
      out_valid <= 1'b0;
      out_bit   <= 1'b0;
    end else if (clear) begin
      wp        <= '0;
      fill      <= '0;
      out_valid <= 1'b0;
    end else begin
      out_valid <= 1'b0;
      if (step) begin
        mem[wp] <= dec;
        wp      <= (wp == AW'(MEM - 1)) ? '0 : wp + 1'b1;
        if (fill != CW'(TB_DEPTH + 1)) fill <= fill + 1'b1;
        // This is step fill+1; its trace reaches step fill+1-TB_DEPTH.
        out_valid <= (fill >= CW'(TB_DEPTH));
        out_bit   <= trace[M-1];
      end
    end
  end

endmodule
