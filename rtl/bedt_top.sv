// bedt_top: three BEDT (bit encoding for data transitions) link coders side
// by side, with a 3:1 multiplexer on their decoded outputs.
//
// Each scheme encodes the incoming word so that the link it drives switches
// less, in particular fewer adjacent-line transitions that charge the
// coupling capacitance, and a decoder behind the link restores the word:
//   scheme I   datain[W1-1:0], odd inversion or none, one control line
//   scheme II  datain,         odd, full or no inversion, two control lines
//   scheme III datain,         even, odd, full or no inversion, two lines
// The link between each encoder and its decoder is a plain wire bundle
// (encoded word plus control lines), all brought out as ports so that their
// switching can be observed. mux picks the decoded word that appears on
// all_schemes_out (00 scheme I, 01 scheme II, 10 scheme III, 11 zero).
//
// Timing: one word per clock; the encoded words, control lines and decoded
// words all change one clock after datain. rst is active-low and synchronous.
// The three schemes, the port names and widths of the data paths and the
// multiplexer codes follow the published design; the separate control-line
// ports, the reset polarity and the timing are this design's choices.
module bedt_top
  import bedt_pkg::*;
#(
  parameter int W  = 32,
  parameter int W1 = 16
) (
  input  logic          clk,
  input  logic          rst,
  input  logic [1:0]    mux,
  input  logic [W-1:0]  datain,
  output logic [W1-1:0] encoder_out_scheme1,
  output logic          scheme1_inv,
  output logic [W1-1:0] scheme1_decoder_out,
  output logic [W-1:0]  encoder_out_scheme2,
  output logic [1:0]    scheme2_ctrl,
  output logic [W-1:0]  scheme2_decoder_out,
  output logic [W-1:0]  encoder_out_scheme3,
  output logic [1:0]    scheme3_ctrl,
  output logic [W-1:0]  scheme3_decoder_out,
  output logic [W-1:0]  all_schemes_out
);

  inv_mode_t ctrl1, ctrl2, ctrl3;

  // Scheme I
  bedt_encoder_s1 #(.W(W1)) u_enc1 (
    .clk(clk), .rst_n(rst), .x(datain[W1-1:0]),
    .z(encoder_out_scheme1), .inv(scheme1_inv)
  );
  assign ctrl1 = scheme1_inv ? INV_ODD : INV_NONE;
  bedt_invert #(.W(W1)) u_dec1 (
    .d(encoder_out_scheme1), .ctrl(ctrl1), .q(scheme1_decoder_out)
  );

  // Scheme II
  bedt_encoder_s2 #(.W(W)) u_enc2 (
    .clk(clk), .rst_n(rst), .x(datain),
    .z(encoder_out_scheme2), .ctrl(ctrl2)
  );
  assign scheme2_ctrl = ctrl2;
  bedt_invert #(.W(W)) u_dec2 (
    .d(encoder_out_scheme2), .ctrl(ctrl2), .q(scheme2_decoder_out)
  );

  // Scheme III
  bedt_encoder_s3 #(.W(W)) u_enc3 (
    .clk(clk), .rst_n(rst), .x(datain),
    .z(encoder_out_scheme3), .ctrl(ctrl3)
  );
  assign scheme3_ctrl = ctrl3;
  bedt_invert #(.W(W)) u_dec3 (
    .d(encoder_out_scheme3), .ctrl(ctrl3), .q(scheme3_decoder_out)
  );

  bedt_scheme_mux #(.W(W), .W1(W1)) u_mux (
    .sel(mux), .s1(scheme1_decoder_out), .s2(scheme2_decoder_out),
    .s3(scheme3_decoder_out), .y(all_schemes_out)
  );

endmodule
