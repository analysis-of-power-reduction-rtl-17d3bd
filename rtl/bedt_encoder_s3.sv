// bedt_encoder_s3: BEDT scheme III encoder (even, odd, full or no inversion).
//
// Scheme III adds even inversion to scheme II. Inverting the even lines
// helps the pairs counted by Te, just as odd inversion helps those counted by
// Ty. The voter chooses, in this order:
//   even  when Te > (W-1)/2, Te > Ty  and  2(T2 - T4**) < 2Te - W + 1
//   odd   when Ty > (W-1)/2  and  2(T2 - T4**) < 2Ty - W + 1
//   full  when T2 > T4**
//   none  otherwise.
// The even test says even inversion beats no, odd and full inversion; the
// rest is the scheme II rule. The encoded word and the control lines
// ctrl = {FI,HI} (11 even, 01 odd, 10 full, 00 none) are registered: they
// change one clock after x. A receiver recovers x with bedt_invert.
// Interface: clk, rst_n (active-low, synchronous, clears z and ctrl), x, z, ctrl.
// The inequalities follow the published scheme; the order of the tests, the
// two control lines and the timing are this design's choices.
module bedt_encoder_s3
  import bedt_pkg::*;
#(
  parameter int W = 32
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [W-1:0] x,
  output logic [W-1:0] z,
  output inv_mode_t    ctrl
);

  localparam int CW = $clog2(W);

  logic [CW-1:0] ty_cnt, te_cnt, t2_cnt, t4s_cnt;
  inv_mode_t     mode;
  logic [W-1:0]  z_next;
  int            ty, te, t2, t4s;

  bedt_transition_counter #(.W(W)) u_cnt (
    .x(x), .y(z),
    .ty_cnt(ty_cnt), .te_cnt(te_cnt), .t2_cnt(t2_cnt), .t4s_cnt(t4s_cnt)
  );

  always_comb begin
    ty  = int'(ty_cnt);
    te  = int'(te_cnt);
    t2  = int'(t2_cnt);
    t4s = int'(t4s_cnt);
    if (2 * te > W - 1 && te > ty && 2 * (t2 - t4s) < 2 * te - W + 1)
      mode = INV_EVEN;
    else if (2 * ty > W - 1 && 2 * (t2 - t4s) < 2 * ty - W + 1)
      mode = INV_ODD;
    else if (t2 > t4s)
      mode = INV_FULL;
    else
      mode = INV_NONE;
  end

  bedt_invert #(.W(W)) u_inv (.d(x), .ctrl(mode), .q(z_next));

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      z    <= '0;
      ctrl <= INV_NONE;
    end else begin
      z    <= z_next;
      ctrl <= mode;
    end
  end

endmodule
