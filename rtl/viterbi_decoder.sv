// viterbi_decoder: rate-1/2, four-state Viterbi decoder with the T-algorithm
// and two-step pre-computation of the optimal path metric.
//
// Datapath, one trellis step per received symbol:
//   bmu        - branch metrics of the incoming symbol (look-up table);
//   pmu        - add-compare-select for all states, then T-algorithm
//                pruning against the precomputed optimal metric;
//   pm_memory  - path metrics and survivor flags, the ACS feedback loop;
//   precompute - optimal metric of the next step, from the stored metrics
//                (two steps back) and the branch metrics of the two steps;
//   smu        - decision storage and trace-back to the decoded bits.
//
// Pipeline: the branch metrics of each symbol are registered (bm_q) and
// the ACS step for symbol n runs when symbol n+1 arrives. This one-symbol
// look-ahead is what lets the precomputation see the branch metrics of
// step n+1 while the ACS is still working on step n, so the optimal metric
// used for pruning is a register at the start of every step and no
// minimum search sits in the ACS loop. The step for the last symbol of a
// stream therefore happens only when another symbol (e.g. a tail or flush
// symbol) arrives. The first step after reset or clear is not pruned,
// since no metric two steps back exists yet.
//
// The unit partition and the T-algorithm with two-step precomputation
// follow the original design; the look-ahead pipeline, the strobe
// interface and the clear input are this design's choice.
//
// Interface: in_valid/rx deliver one received symbol {X1, X0} (Q bits per
// sample) per cycle, at any rate. thresh is the T-algorithm threshold T;
// its maximum value effectively turns pruning off (full-trellis decoding
// as long as the metric spread stays below it). out_valid/out_bit give one
// decoded bit per symbol; the bit of symbol n comes out TB_DEPTH+1 symbols
// later, one cycle after that symbol's arrival (TB_DEPTH+2 cycles at one
// symbol per cycle). active_states and pruned_states report the survivors
// and the states dropped by the last step. clear restarts the trellis in S0.
module viterbi_decoder
  import vd_pkg::*;
#(
  parameter int unsigned Q        = 1,          // bits per received sample
  parameter int unsigned PM_W     = PM_W_DEF,   // path metric width
  parameter int unsigned BM_W     = BM_W_DEF,   // branch metric width
  parameter int unsigned TB_DEPTH = 64          // survivor path length
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     clear,
  input  logic                     in_valid,
  input  logic [2*Q-1:0]           rx,
  input  logic [PM_W-2:0]          thresh,
  output logic                     out_valid,
  output logic                     out_bit,
  output logic [$clog2(NS+1)-1:0]  active_states,
  output logic [$clog2(NS+1)-1:0]  pruned_states
);

  localparam int unsigned CNT_W = $clog2(NS + 1);

  // ---- branch metrics, with one symbol of look-ahead
  logic [BM_W-1:0] bm_in [NCW];
  logic [BM_W-1:0] bm_q  [NCW];
  logic            have_q;         // bm_q holds a symbol not yet processed
  logic            step;

  bmu #(.Q(Q), .BM_W(BM_W)) u_bmu (.rx(rx), .bm(bm_in));

  assign step = in_valid && have_q;

  // ---- path metric memory
  logic [PM_W-1:0] pm     [NS];
  logic [NS-1:0]   ok;
  logic [PM_W-1:0] pm_new [NS];
  logic [NS-1:0]   ok_new;

  pm_memory #(.PM_W(PM_W)) u_pmm (
    .clk, .rst_n, .clear, .step,
    .pm_in (pm_new), .ok_in (ok_new),
    .pm_out(pm),     .ok_out(ok)
  );

  // ---- precomputed optimal metric
  logic [PM_W-1:0] pm_opt_next, pm_opt_q;
  logic            prune_q;

  precompute #(.PM_W(PM_W), .BM_W(BM_W)) u_pre (
    .pm(pm), .ok(ok), .bm_prev(bm_q), .bm_cur(bm_in), .pm_opt(pm_opt_next)
  );

  // ---- add-compare-select with T-algorithm pruning
  logic [NS-1:0]    dec, pruned;
  state_t           best;
  logic [PM_W-1:0]  best_pm;
  logic [CNT_W-1:0] n_active;

  pmu #(.PM_W(PM_W), .BM_W(BM_W)) u_pmu (
    .pm, .ok, .bm(bm_q), .pm_opt(pm_opt_q), .thresh, .prune_en(prune_q),
    .pm_new, .ok_new, .dec, .pruned, .best, .best_pm, .n_active
  );

  // ---- survivor path unit
  smu #(.TB_DEPTH(TB_DEPTH)) u_smu (
    .clk, .rst_n, .clear, .step, .dec, .best, .out_valid, .out_bit
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      have_q        <= 1'b0;
      prune_q       <= 1'b0;
      pm_opt_q      <= '0;
      active_states <= CNT_W'(1);
      pruned_states <= '0;
      for (int c = 0; c < NCW; c++) bm_q[c] <= '0;
    end else if (clear) begin
      have_q        <= 1'b0;
      prune_q       <= 1'b0;
      active_states <= CNT_W'(1);
      pruned_states <= '0;
    end else if (in_valid) begin
      have_q <= 1'b1;
      bm_q   <= bm_in;
      if (step) begin
        pm_opt_q      <= pm_opt_next;
        prune_q       <= 1'b1;
        active_states <= n_active;
        pruned_states <= CNT_W'($countones(pruned));
      end
    end
  end

  // The precomputed optimal metric never exceeds the true step minimum.
  logic [PM_W-1:0] gap;
  assign gap = best_pm - pm_opt_q;
  a_opt_bound: assert property (@(posedge clk) disable iff (!rst_n)
    (step && prune_q && |ok_new) |-> !gap[PM_W-1]);
  // The best state always survives its own pruning.
  a_alive: assert property (@(posedge clk) disable iff (!rst_n)
    step |-> |ok_new);

endmodule
