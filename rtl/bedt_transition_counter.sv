// bedt_transition_counter: the array of pair detectors of a BEDT encoder and
// the counters behind its majority voter.
//
// The W lines of the current word x and of the previously sent word y form
// W-1 overlapping pairs (line i with line i+1). One bedt_pair_detector per
// pair flags the pair; this block adds the flags up:
//   ty_cnt   pairs helped by odd inversion   (Ty)
//   te_cnt   pairs helped by even inversion  (Te)
//   t2_cnt   Type II pairs                   (T2)
//   t4s_cnt  Type IV pairs with differing previous bits (T4**)
// Each count fits in $clog2(W) bits because it is at most W-1. Purely
// combinational; the adders are left to synthesis. Counting over the data
// lines only, not over the control lines, is this design's choice.
module bedt_transition_counter
  import bedt_pkg::*;
#(
  parameter int W = 32
) (
  input  logic [W-1:0]         x,
  input  logic [W-1:0]         y,
  output logic [$clog2(W)-1:0] ty_cnt,
  output logic [$clog2(W)-1:0] te_cnt,
  output logic [$clog2(W)-1:0] t2_cnt,
  output logic [$clog2(W)-1:0] t4s_cnt
);

  localparam int NP = W - 1;  // number of line pairs
  localparam int CW = $clog2(W);

  logic [NP-1:0] ty, te, t2, t4s;

  for (genvar i = 0; i < NP; i++) begin : g_pair
    pair_kind_t kind_unused;
    bedt_pair_detector #(.LOW_LINE_ODD(i % 2 == 1)) u_det (
      .x    (x[i+1:i]),
      .y    (y[i+1:i]),
      .kind (kind_unused),
      .ty   (ty[i]),
      .te   (te[i]),
      .t2   (t2[i]),
      .t4s  (t4s[i])
    );
  end

  always_comb begin
    ty_cnt  = '0;
    te_cnt  = '0;
    t2_cnt  = '0;
    t4s_cnt = '0;
    for (int i = 0; i < NP; i++) begin
      ty_cnt  += CW'(ty[i]);
      te_cnt  += CW'(te[i]);
      t2_cnt  += CW'(t2[i]);
      t4s_cnt += CW'(t4s[i]);
    end
  end

endmodule
