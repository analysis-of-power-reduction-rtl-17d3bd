// bedt_pkg: types and helper functions shared by the BEDT (bit encoding for
// data transitions) link encoders and decoders.
//
// A link word travels with two control lines, FI (full invert) and HI (half
// invert). The receiver applies  out_i = z_i ^ FI        for even i
//                                out_i = z_i ^ FI ^ HI   for odd i,
// so the four control values select no, odd, full or even inversion.
//
// Transition types of two adjacent lines between the previous and the
// current word, and their coupling cost with weights K1=1, K2=2, K3=K4=0:
//   TYPE_I   one line switches, the other holds          cost 1
//   TYPE_II  both switch in opposite directions          cost 2
//   TYPE_III both switch in the same direction           cost 0
//   TYPE_IV  neither line switches                       cost 0
// The weights and the four types follow the published scheme; the packing of
// the control value as {FI,HI} is this design's choice.
package bedt_pkg;

  // Inversion applied to a word, encoded as the control lines {FI,HI}.
  typedef enum logic [1:0] {
    INV_NONE = 2'b00,
    INV_ODD  = 2'b01,
    INV_FULL = 2'b10,
    INV_EVEN = 2'b11
  } inv_mode_t;

  typedef enum logic [1:0] {
    TYPE_I   = 2'd0,
    TYPE_II  = 2'd1,
    TYPE_III = 2'd2,
    TYPE_IV  = 2'd3
  } pair_kind_t;

  // Transition type of one line pair. Bit 0 is line i, bit 1 is line i+1.
  function automatic pair_kind_t pair_kind(input logic [1:0] prev,
                                           input logic [1:0] cur);
    logic [1:0] sw;
    sw = prev ^ cur;
    unique case (sw)
      2'b00:          return TYPE_IV;
      2'b01, 2'b10:   return TYPE_I;
      default:        return (cur[0] != cur[1]) ? TYPE_II : TYPE_III;
    endcase
  endfunction

  // Coupling cost of one pair transition (K1 = 1, K2 = 2, K3 = K4 = 0).
  function automatic logic [1:0] pair_cost(input logic [1:0] prev,
                                           input logic [1:0] cur);
    pair_kind_t k;
    k = pair_kind(prev, cur);
    if (k == TYPE_I)  return 2'd1;
    if (k == TYPE_II) return 2'd2;
    return 2'd0;
  endfunction

endpackage
