// bedt_pair_detector: the per-pair transition detector (the "Ty" sub-block)
// of a BEDT encoder.
//
// It looks at two adjacent link lines, i and i+1, in the previously sent word
// (y) and in the word about to be sent (x), and reports:
//   kind  the transition type, TYPE_I .. TYPE_IV (see bedt_pkg)
//   ty    inverting the odd line of the pair would lower its coupling cost
//   te    inverting the even line of the pair would lower its coupling cost
//   t2    the transition is Type II
//   t4s   the transition is Type IV with differing previous bits; a full
//         inversion would turn it into Type II (the "T4**" count)
// Inverting one line of a pair always moves its cost by exactly one unit up
// or down, so summing ty over all pairs gives the Ty of the majority test
// Ty > (W-1)/2. LOW_LINE_ODD says whether line i (x[0]) is the odd line;
// otherwise line i+1 is. Purely combinational.
//
// The type definitions and the weights follow the published scheme; deriving
// ty and te from the cost change is this design's reading of it.
module bedt_pair_detector
  import bedt_pkg::*;
#(
  parameter bit LOW_LINE_ODD = 1'b0
) (
  input  logic [1:0] x,
  input  logic [1:0] y,
  output pair_kind_t kind,
  output logic       ty,
  output logic       te,
  output logic       t2,
  output logic       t4s
);

  localparam logic [1:0] ODD_MASK  = LOW_LINE_ODD ? 2'b01 : 2'b10;
  localparam logic [1:0] EVEN_MASK = ~ODD_MASK;

  logic [1:0] cost_none, cost_odd, cost_even;

  always_comb begin
    kind      = pair_kind(y, x);
    cost_none = pair_cost(y, x);
    cost_odd  = pair_cost(y, x ^ ODD_MASK);
    cost_even = pair_cost(y, x ^ EVEN_MASK);
    ty        = cost_odd < cost_none;
    te        = cost_even < cost_none;
    t2        = kind == TYPE_II;
    t4s       = (kind == TYPE_IV) && (y[0] != y[1]);
  end

endmodule
