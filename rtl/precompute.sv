// precompute: two-step pre-computation of the optimal path metric.
//
// The T-algorithm compares each new path metric of step n with the
// smallest one of that step. Finding that minimum after the ACS would put a
// compare tree inside the ACS feedback loop. Instead it is computed from the
// metrics two steps back, which are already stored, and from the branch
// metrics of steps n-1 and n, which depend only on received data:
//
//   m2[i]     = min over u2 of bm_n  (code word of state i, input u2)
//   c[j]      = pm_{n-2}[j] + min over u1 of
//                 ( bm_{n-1}(code word of state j, input u1) + m2[next(j,u1)] )
//   pm_opt(n) = min over surviving states j of c[j]
//
// c[j] is the best two-step extension of state j, so pm_opt(n) is the
// smallest step-n metric over all paths from the step n-2 survivors. It is
// exactly the step-n minimum when the threshold is at least the largest
// branch metric (a path through a state pruned at step n-1 can then never be
// the best); otherwise it is a lower bound, so it prunes no more than an
// exact minimum would. Comparisons are modulo-PM_W.
//
// Two-step precomputation is the depth the original design selects; the
// formula above, worked out for this four-state trellis, is this design's.
//
// Purely combinational; the decoder registers the result for the next step.
module precompute
  import vd_pkg::*;
#(
  parameter int unsigned PM_W = PM_W_DEF,
  parameter int unsigned BM_W = BM_W_DEF
) (
  input  logic [PM_W-1:0] pm      [NS],   // metrics of step n-2
  input  logic [NS-1:0]   ok,             // survivor flags of step n-2
  input  logic [BM_W-1:0] bm_prev [NCW],  // branch metrics of step n-1
  input  logic [BM_W-1:0] bm_cur  [NCW],  // branch metrics of step n
  output logic [PM_W-1:0] pm_opt
);

  logic [BM_W-1:0] m2 [NS];
  logic [BM_W:0]   two [NS];
  logic [PM_W-1:0] c   [NS];

  always_comb begin
    logic [BM_W-1:0] a, b;
    logic [BM_W:0]   s0, s1;
    for (int i = 0; i < NS; i++) begin
      a = bm_cur[codeword(state_t'(i), 1'b0)];
      b = bm_cur[codeword(state_t'(i), 1'b1)];
      m2[i] = (b < a) ? b : a;
    end
    for (int j = 0; j < NS; j++) begin
      s0 = {1'b0, bm_prev[codeword(state_t'(j), 1'b0)]} +
           {1'b0, m2[next_state(state_t'(j), 1'b0)]};
      s1 = {1'b0, bm_prev[codeword(state_t'(j), 1'b1)]} +
           {1'b0, m2[next_state(state_t'(j), 1'b1)]};
      two[j] = (s1 < s0) ? s1 : s0;
      c[j]   = pm[j] + PM_W'(two[j]);
    end
  end

  logic            found;
  logic [PM_W-1:0] d;

  always_comb begin
    pm_opt = '0;
    found  = 1'b0;
    d      = '0;
    for (int j = 0; j < NS; j++) begin
      if (ok[j]) begin
        d = c[j] - pm_opt;
        if (!found || d[PM_W-1]) pm_opt = c[j];
        found = 1'b1;
      end
    end
  end

endmodule
