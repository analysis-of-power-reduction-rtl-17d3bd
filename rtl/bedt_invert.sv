// bedt_invert: the inversion stage of the BEDT link, used both as the last
// stage of every encoder and as the decoder.
//
// With the control lines ctrl = {FI,HI}:
//   q_i = d_i ^ FI        for even i
//   q_i = d_i ^ FI ^ HI   for odd i
// so {FI,HI} = 00 passes the word, 01 inverts the odd lines, 10 inverts all
// lines and 11 inverts the even lines. The stage is its own inverse, which is
// why the decoder is the same XOR network driven by the received control
// lines. Purely combinational. The XOR equations follow the published
// decoder; carrying FI and HI as two lines is this design's choice.
module bedt_invert
  import bedt_pkg::*;
#(
  parameter int W = 32
) (
  input  logic [W-1:0] d,
  input  inv_mode_t    ctrl,
  output logic [W-1:0] q
);

  logic fi, hi;
  assign {fi, hi} = ctrl;

  always_comb begin
    for (int i = 0; i < W; i++)
      q[i] = d[i] ^ fi ^ (hi & (i % 2 == 1));
  end

endmodule
