// bedt_encoder_s2: BEDT scheme II encoder (odd, full or no inversion).
//
// Each clock the incoming word x is compared pair by pair with the word sent
// in the previous clock (the output register). From the pair detectors come
//   Ty    pairs helped by odd inversion
//   T2    Type II pairs (adjacent lines switching in opposite directions)
//   T4**  quiet pairs whose lines differ, which full inversion makes Type II
// and the voter chooses, in this order:
//   odd   when Ty > (W-1)/2  and  2(T2 - T4**) < 2Ty - W + 1
//   full  when T2 > T4**
//   none  otherwise.
// The first test says odd inversion beats both no inversion and full
// inversion; the second that full inversion beats none. The encoded word and
// the control lines ctrl = {FI,HI} (01 odd, 10 full, 00 none) are registered:
// they change one clock after x. A receiver recovers x with bedt_invert.
// Interface: clk, rst_n (active-low, synchronous, clears z and ctrl), x, z, ctrl.
// The two inequalities follow the published scheme; the fallback order, the
// two control lines and the timing are this design's choices.
module bedt_encoder_s2
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

  logic [CW-1:0] ty_cnt, te_cnt_unused, t2_cnt, t4s_cnt;
  inv_mode_t     mode;
  logic [W-1:0]  z_next;
  int            ty, t2, t4s;

  bedt_transition_counter #(.W(W)) u_cnt (
    .x(x), .y(z),
    .ty_cnt(ty_cnt), .te_cnt(te_cnt_unused), .t2_cnt(t2_cnt), .t4s_cnt(t4s_cnt)
  );

  always_comb begin
    ty  = int'(ty_cnt);
    t2  = int'(t2_cnt);
    t4s = int'(t4s_cnt);
    if (2 * ty > W - 1 && 2 * (t2 - t4s) < 2 * ty - W + 1) mode = INV_ODD;
    else if (t2 > t4s)                                      mode = INV_FULL;
    else                                                    mode = INV_NONE;
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
