// bedt_scheme_mux: 3:1 multiplexer that picks the decoded word of one BEDT
// scheme for the shared output.
//   sel = 00  scheme I word (W1 bits, zero-extended to W)
//   sel = 01  scheme II word
//   sel = 10  scheme III word
//   sel = 11  all zeros
// Purely combinational. The select codes follow the published design; the
// zero extension and the all-zero fourth code are this design's reading of
// the published traces.
module bedt_scheme_mux #(
  parameter int W  = 32,
  parameter int W1 = 16
) (
  input  logic [1:0]    sel,
  input  logic [W1-1:0] s1,
  input  logic [W-1:0]  s2,
  input  logic [W-1:0]  s3,
  output logic [W-1:0]  y
);

  always_comb begin
    unique case (sel)
      2'b00:   y = W'(s1);
      2'b01:   y = s2;
      2'b10:   y = s3;
      default: y = '0;
    endcase
  end

endmodule
