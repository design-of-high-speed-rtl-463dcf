// pm_memory: path metric memory of the decoder.
//
// Holds one PM_W-bit path metric and one survivor flag per trellis state.
// It closes the ACS feedback loop: the path metric unit reads the metrics
// of step n-1 from here and, on a step strobe, the metrics of step n are
// written back. A state's metric is written only if the state survived the
// T-algorithm (its per-state write enable is its new survivor flag), so
// pruned states cost no register activity; the survivor flags are always
// updated.
//
// Reset, or a synchronous clear, loads the start of a trellis: state S0
// with metric 0 is the only survivor, matching an encoder that starts in S0.
//
// A path metric memory in the ACS feedback loop is part of the original
// design; its organisation as registers, the survivor flags and the gated
// writes are this design's choice.
//
// Timing: one write per cycle in which step is high; reads are the register
// outputs.
module pm_memory
  import vd_pkg::*;
#(
  parameter int unsigned PM_W = PM_W_DEF
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            clear,
  input  logic            step,
  input  logic [PM_W-1:0] pm_in  [NS],
  input  logic [NS-1:0]   ok_in,
  output logic [PM_W-1:0] pm_out [NS],
  output logic [NS-1:0]   ok_out
);

  localparam logic [NS-1:0] OK_INIT = NS'(1);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int s = 0; s < NS; s++) pm_out[s] <= '0;
      ok_out <= OK_INIT;
    end else if (clear) begin
      for (int s = 0; s < NS; s++) pm_out[s] <= '0;
      ok_out <= OK_INIT;
    end else if (step) begin
      for (int s = 0; s < NS; s++)
        if (ok_in[s]) pm_out[s] <= pm_in[s];
      ok_out <= ok_in;
    end
  end

endmodule
