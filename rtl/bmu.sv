// bmu: branch metric unit.
//
// For a received symbol (two quantised code-bit samples) it gives the
// distance to each of the four rate-1/2 code words {c1, c0}. The metric is
// the squared Euclidean distance sum_b (X_b - Y_b)^2, where the expected
// sample Y_b is 0 for code bit 0 and 2^Q-1 for code bit 1. With Q = 1 (hard
// decision, the default) this is exactly the Hamming distance. The unit is a
// look-up table indexed by the received symbol; the table is built at
// elaboration from that formula.
//
// The look-up table, the Hamming metric for hard decisions and the (X-Y)^2
// metric for soft ones follow the original design; the sample levels and
// the Q parameter are this design's choice.
//
// Interface: rx holds the two samples {X1, X0}, Q bits each. bm[c] is the
// branch metric of code word c. Purely combinational.
module bmu
  import vd_pkg::*;
#(
  parameter int unsigned Q    = 1,          // soft-decision bits per code bit
  parameter int unsigned BM_W = BM_W_DEF    // branch metric width
) (
  input  logic [2*Q-1:0]  rx,
  output logic [BM_W-1:0] bm [NCW]
);

  localparam int unsigned NRX   = 1 << (2*Q);
  localparam int unsigned YMAX  = (1 << Q) - 1;
  localparam int unsigned ENTRY = NCW * BM_W;

  // The largest metric, 2*(2^Q-1)^2, has to fit in BM_W bits.
  initial assert (2 * YMAX * YMAX < (1 << BM_W))
    else $error("bmu: BM_W=%0d too small for Q=%0d", BM_W, Q);

  function automatic int unsigned sq_dist(int unsigned x, logic c);
    int unsigned y;
    int unsigned d;
    y = c ? YMAX : 0;
    d = (x > y) ? x - y : y - x;
    return d * d;
  endfunction

  // LUT[r*ENTRY + c*BM_W +: BM_W] = metric of code word c for received r.
  function automatic logic [NRX*ENTRY-1:0] build_lut();
    logic [NRX*ENTRY-1:0] t;
    int unsigned x1, x0, m;
    t = '0;
    for (int unsigned r = 0; r < NRX; r++) begin
      x1 = r >> Q;
      x0 = r & YMAX;
      for (int unsigned c = 0; c < NCW; c++) begin
        m = sq_dist(x1, c[1]) + sq_dist(x0, c[0]);
        t[r*ENTRY + c*BM_W +: BM_W] = BM_W'(m);
      end
    end
    return t;
  endfunction

  localparam logic [NRX*ENTRY-1:0] LUT = build_lut();

  logic [ENTRY-1:0] row;

  always_comb begin
    row = LUT[rx*ENTRY +: ENTRY];
    for (int c = 0; c < NCW; c++) bm[c] = row[c*BM_W +: BM_W];
  end

endmodule
