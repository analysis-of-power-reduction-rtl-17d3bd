// bedt_encoder_s1: BEDT scheme I encoder (odd inversion or none).
//
// Each clock the incoming word x is compared, pair of adjacent lines by pair,
// with the word sent in the previous clock (held in the output register).
// Ty counts the pairs whose coupling cost would drop if the odd lines were
// inverted. A majority voter then applies the scheme I rule
//     invert the odd lines  when  Ty > (W-1)/2
// and the result is registered: z and inv change one clock after x, and the
// registered z is the "previous word" for the next decision. inv is the
// inversion line that travels with z; a receiver recovers x as
// z ^ (inv ? odd-line mask : 0).
// Interface: clk, rst_n (active-low, synchronous, clears z and inv), x, z, inv.
// The rule and the majority voter follow the published scheme; the reset,
// the one-clock timing and pairing over the W data lines are this design's
// choices.
module bedt_encoder_s1
  import bedt_pkg::*;
#(
  parameter int W = 16
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [W-1:0] x,
  output logic [W-1:0] z,
  output logic         inv
);

  localparam int CW = $clog2(W);

  logic [CW-1:0] ty_cnt, te_cnt_unused, t2_cnt_unused, t4s_cnt_unused;
  inv_mode_t     mode;
  logic [W-1:0]  z_next;

  bedt_transition_counter #(.W(W)) u_cnt (
    .x(x), .y(z),
    .ty_cnt(ty_cnt), .te_cnt(te_cnt_unused), .t2_cnt(t2_cnt_unused),
    .t4s_cnt(t4s_cnt_unused)
  );

  // Majority voter: 2*Ty > W-1 is Ty > (W-1)/2 without fractions.
  always_comb begin
    if (2 * int'(ty_cnt) > W - 1) mode = INV_ODD;
    else                          mode = INV_NONE;
  end

  bedt_invert #(.W(W)) u_inv (.d(x), .ctrl(mode), .q(z_next));

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      z   <= '0;
      inv <= 1'b0;
    end else begin
      z   <= z_next;
      inv <= (mode == INV_ODD);
    end
  end

endmodule
