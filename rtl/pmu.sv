// pmu: path metric unit with T-algorithm pruning.
//
// One acs element per state computes the new path metric and decision bit
// of that state from the stored metrics of its two predecessors and the
// branch metrics of the current trellis step. The T-algorithm then drops
// every state whose new metric exceeds the optimal (smallest) metric of this
// step by more than the threshold: such a state is marked invalid, its
// stored metric is not rewritten and the acs elements that would use it
// next step see it as absent. That is where power is saved: fewer metric
// registers toggle, and all-pruned butterflies do no work.
//
// The optimal metric pm_opt is not found here by a minimum search over the
// new metrics, which would lengthen the ACS feedback loop; it arrives
// already computed by the two-step precomputation unit (precompute). With
// prune_en low (first step after reset) no state is pruned.
//
// Outputs also give the best surviving state (smallest new metric) to start
// the trace-back, and the number of surviving states.
//
// The ACS array and the use of a T-algorithm with a precomputed optimum
// follow the original design; the pruning rule details (strictly greater
// than T is pruned, threshold as an input) and the best-state search are
// this design's choice.
//
// Purely combinational; metric comparisons are modulo-PM_W differences.
module pmu
  import vd_pkg::*;
#(
  parameter int unsigned PM_W = PM_W_DEF,
  parameter int unsigned BM_W = BM_W_DEF
) (
  input  logic [PM_W-1:0]   pm     [NS],  // stored metrics, step n-1
  input  logic [NS-1:0]     ok,           // survivor flags, step n-1
  input  logic [BM_W-1:0]   bm     [NCW], // branch metrics, step n
  input  logic [PM_W-1:0]   pm_opt,       // precomputed optimal metric, step n
  input  logic [PM_W-2:0]   thresh,       // T-algorithm threshold T
  input  logic              prune_en,
  output logic [PM_W-1:0]   pm_new [NS],  // metrics, step n
  output logic [NS-1:0]     ok_new,       // survivor flags after pruning
  output logic [NS-1:0]     dec,          // decision bits, step n
  output logic [NS-1:0]     pruned,       // reached by ACS but dropped by T
  output state_t            best,
  output logic [PM_W-1:0]   best_pm,
  output logic [$clog2(NS+1)-1:0] n_active
);

  logic [NS-1:0] acs_ok;

  for (genvar s = 0; s < NS; s++) begin : g_acs
    localparam state_t ST = state_t'(s);
    localparam state_t UP = prev_state(ST, 1'b0);
    localparam state_t LO = prev_state(ST, 1'b1);
    localparam logic   U  = ST[M-1];            // input bit into this state
    localparam cw_t    CU = codeword(UP, U);
    localparam cw_t    CL = codeword(LO, U);

    acs #(.PM_W(PM_W), .BM_W(BM_W)) u_acs (
      .pm_up  (pm[UP]),
      .ok_up  (ok[UP]),
      .bm_up  (bm[CU]),
      .pm_lo  (pm[LO]),
      .ok_lo  (ok[LO]),
      .bm_lo  (bm[CL]),
      .pm_new (pm_new[s]),
      .dec    (dec[s]),
      .ok_new (acs_ok[s])
    );
  end

  logic [PM_W-1:0] excess [NS];

  always_comb begin
    for (int s = 0; s < NS; s++) begin
      excess[s] = pm_new[s] - pm_opt;
      // A negative excess cannot happen when pm_opt is a true lower bound;
      // such a state is kept rather than pruned.
      if (acs_ok[s] && prune_en && !excess[s][PM_W-1] &&
          excess[s] > PM_W'(thresh)) begin
        ok_new[s] = 1'b0;
        pruned[s] = 1'b1;
      end else begin
        ok_new[s] = acs_ok[s];
        pruned[s] = 1'b0;
      end
    end
  end

  logic              found;
  logic [PM_W-1:0]   d;

  always_comb begin
    best     = '0;
    best_pm  = '0;
    found    = 1'b0;
    n_active = '0;
    d        = '0;
    for (int s = 0; s < NS; s++) begin
      if (ok_new[s]) begin
        n_active = n_active + 1'b1;
        d = pm_new[s] - best_pm;
        if (!found || d[PM_W-1]) begin
          best    = state_t'(s);
          best_pm = pm_new[s];
        end
        found = 1'b1;
      end
    end
  end

endmodule
