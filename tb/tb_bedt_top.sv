// tb_bedt_top: end-to-end test of the three BEDT link coders and the output
// multiplexer, with every parameter at its default (32-bit data, 16-bit
// scheme I).
//
// One word per clock goes in on datain while mux steps through all four
// codes. For every word the testbench works out, from its own copy of each
// link's previous word and the coupling costs of the candidate words
// (bedt_ref_pkg), what each encoder must send; one clock later it checks the
// encoded words, the control lines, the three decoded words (which must equal
// the word sent in) and all_schemes_out. The run starts with the published
// example 0xABABABAB held for several clocks (sent as 0x01010101 with odd
// inversion by schemes II and III, 0x0101 by scheme I) and the word
// 0x00BC614E with mux = 3, then mixes random words with words built to
// provoke each inversion mode, and applies a reset in the middle of the
// stream. Every mechanism (each inversion mode of each scheme, each mux code,
// the reset) is counted and must occur at least once. It prints the line
// toggles and coupling cost with and without coding.
module tb_bedt_top;
  import bedt_ref_pkg::*;

  localparam int W  = 32;
  localparam int W1 = 16;

  int checks = 0, failures = 0;
  int s1_seen [2];
  int s2_seen [4];
  int s3_seen [4];
  int mux_seen [4];
  int resets = 0;
  int tog_plain = 0, tog2 = 0, tog3 = 0, cc_plain = 0, cc2 = 0, cc3 = 0;
  bit random_phase = 1'b0;  // statistics below cover uniform random words only
  int r_cc_plain = 0, r_cc1 = 0, r_cc2 = 0, r_cc3 = 0;
  int r_cc1_plain = 0;

  logic          clk = 1'b0;
  logic          rst;
  logic [1:0]    mux;
  logic [W-1:0]  datain;
  logic [W1-1:0] encoder_out_scheme1, scheme1_decoder_out;
  logic          scheme1_inv;
  logic [W-1:0]  encoder_out_scheme2, scheme2_decoder_out;
  logic [W-1:0]  encoder_out_scheme3, scheme3_decoder_out;
  logic [1:0]    scheme2_ctrl, scheme3_ctrl;
  logic [W-1:0]  all_schemes_out;

  always #5 clk = ~clk;

  bedt_top dut (
    .clk(clk), .rst(rst), .mux(mux), .datain(datain),
    .encoder_out_scheme1(encoder_out_scheme1), .scheme1_inv(scheme1_inv),
    .scheme1_decoder_out(scheme1_decoder_out),
    .encoder_out_scheme2(encoder_out_scheme2), .scheme2_ctrl(scheme2_ctrl),
    .scheme2_decoder_out(scheme2_decoder_out),
    .encoder_out_scheme3(encoder_out_scheme3), .scheme3_ctrl(scheme3_ctrl),
    .scheme3_decoder_out(scheme3_decoder_out),
    .all_schemes_out(all_schemes_out));

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  function automatic int adjacent_changes(logic [W-1:0] v);
    int n;
    n = 0;
    for (int i = 0; i + 1 < W; i++) n += int'(v[i] != v[i+1]);
    return n;
  endfunction

  // each link's previously sent word, as the testbench models it
  logic [W1-1:0] prev1;
  logic [W-1:0]  prev2, prev3;

  task automatic do_reset();
    @(negedge clk);
    rst = 1'b0;
    @(posedge clk);
    #1;
    check(encoder_out_scheme1 == '0 && encoder_out_scheme2 == '0 &&
          encoder_out_scheme3 == '0 && !scheme1_inv && scheme2_ctrl == 2'b00 &&
          scheme3_ctrl == 2'b00, "reset clears the links");
    prev1 = '0;
    prev2 = '0;
    prev3 = '0;
    resets++;
    rst = 1'b1;  // released before the next rising edge
  endtask

  task automatic send(logic [W-1:0] word, logic [1:0] sel);
    logic [1:0]    m1, m2, m3;
    logic [W1-1:0] e1;
    logic [W-1:0]  e2, e3, eall;
    m1 = decide(1, W1, 64'(prev1), 64'(word[W1-1:0]));
    m2 = decide(2, W,  64'(prev2), 64'(word));
    m3 = decide(3, W,  64'(prev3), 64'(word));
    e1 = word[W1-1:0] ^ W1'(mode_mask(W1, m1));
    e2 = word ^ W'(mode_mask(W, m2));
    e3 = word ^ W'(mode_mask(W, m3));
    case (sel)
      2'b00:   eall = W'(word[W1-1:0]);
      2'b01:   eall = word;
      2'b10:   eall = word;
      default: eall = '0;
    endcase
    @(negedge clk);
    datain = word;
    mux = sel;
    @(posedge clk);
    #1;
    check(encoder_out_scheme1 === e1 && scheme1_inv === m1[0],
          $sformatf("scheme I link for %h: %h/%b, expected %h/%b", word,
                    encoder_out_scheme1, scheme1_inv, e1, m1[0]));
    check(encoder_out_scheme2 === e2 && scheme2_ctrl === m2,
          $sformatf("scheme II link for %h: %h/%b, expected %h/%b", word,
                    encoder_out_scheme2, scheme2_ctrl, e2, m2));
    check(encoder_out_scheme3 === e3 && scheme3_ctrl === m3,
          $sformatf("scheme III link for %h: %h/%b, expected %h/%b", word,
                    encoder_out_scheme3, scheme3_ctrl, e3, m3));
    check(scheme1_decoder_out === word[W1-1:0], "scheme I decoder restores the word");
    check(scheme2_decoder_out === word, "scheme II decoder restores the word");
    check(scheme3_decoder_out === word, "scheme III decoder restores the word");
    check(all_schemes_out === eall,
          $sformatf("all_schemes_out %h with mux %b, expected %h", all_schemes_out, sel, eall));
    s1_seen[m1[0]]++;
    s2_seen[m2]++;
    s3_seen[m3]++;
    mux_seen[sel]++;
    tog_plain += toggles(W, 64'(prev2), 64'(word));
    tog2      += toggles(W, 64'(prev2), 64'(e2));
    tog3      += toggles(W, 64'(prev3), 64'(e3));
    cc_plain  += cost(W, 64'(prev2), 64'(word));
    cc2       += cost(W, 64'(prev2), 64'(e2));
    cc3       += cost(W, 64'(prev3), 64'(e3));
    if (random_phase) begin
      r_cc1_plain += cost(W1, 64'(prev1), 64'(word[W1-1:0]));
      r_cc1       += cost(W1, 64'(prev1), 64'(e1));
      r_cc_plain  += cost(W, 64'(prev2), 64'(word));
      r_cc2       += cost(W, 64'(prev2), 64'(e2));
      r_cc3       += cost(W, 64'(prev3), 64'(e3));
    end
    prev1 = e1;
    prev2 = e2;
    prev3 = e3;
  endtask

  initial begin
    logic [W-1:0] w;
    rst = 1'b0;
    mux = 2'b00;
    datain = '0;
    prev1 = '0;
    prev2 = '0;
    prev3 = '0;
    repeat (2) @(posedge clk);
    do_reset();

    // published example word, held as in the published traces
    send(32'hABABABAB, 2'b00);
    check(encoder_out_scheme2 == 32'h01010101 && scheme2_ctrl == 2'b01,
          "example: scheme II sends 0x01010101 with HI=1, FI=0");
    check(encoder_out_scheme3 == 32'h01010101 && scheme3_ctrl == 2'b01,
          "example: scheme III sends 0x01010101 with HI=1, FI=0");
    check(encoder_out_scheme1 == 16'h0101 && scheme1_inv, "example: scheme I sends 0x0101");
    // changes between neighbouring bits of one word: 24 in the example word,
    // 7 in the coded word (8 counting an inversion line set to 1 above bit 31)
    check(adjacent_changes(32'hABABABAB) == 24 && adjacent_changes(encoder_out_scheme2) == 7,
          "example: 24 neighbouring-bit changes reduced to 7");
    send(32'hABABABAB, 2'b01);
    send(32'hABABABAB, 2'b10);
    check(encoder_out_scheme2 == 32'h01010101, "held example word keeps its coding");

    // word of the hardware capture, with mux = 3
    do_reset();
    send(32'h00BC614E, 2'b11);
    check(all_schemes_out == '0, "mux = 3 gives zero");
    $display("0x00BC614E after reset: scheme I %h inv=%b, scheme II %h ctrl=%b, scheme III %h ctrl=%b",
             encoder_out_scheme1, scheme1_inv, encoder_out_scheme2, scheme2_ctrl,
             encoder_out_scheme3, scheme3_ctrl);

    for (int k = 0; k < 4000; k++) begin
      if (k == 2000) do_reset();
      case ($urandom % 6)
        0: w = $urandom;
        1: w = prev3 ^ W'(even_mask(W));
        2: w = prev2 ^ W'(odd_mask(W));
        3: w = ~prev2 ^ W'($urandom & $urandom & $urandom);
        4: w = prev2 ^ W'($urandom & $urandom);
        default: w = {W/2{2'($urandom)}};
      endcase
      send(w, 2'($urandom));
    end

    // uniform random words, for the coupling statistics of unbiased data
    random_phase = 1'b1;
    for (int k = 0; k < 4000; k++) send($urandom, 2'($urandom));
    random_phase = 1'b0;
    check(r_cc1 < r_cc1_plain && r_cc2 < r_cc_plain && r_cc3 <= r_cc2,
          "random data: every scheme lowers the coupling cost");

    check(s1_seen[0] > 0 && s1_seen[1] > 0, "scheme I: plain and odd-inverted words both sent");
    check(s2_seen[0] > 0 && s2_seen[1] > 0 && s2_seen[2] > 0,
          "scheme II: none, odd and full inversion all used");
    check(s2_seen[3] == 0, "scheme II never uses even inversion");
    check(s3_seen[0] > 0 && s3_seen[1] > 0 && s3_seen[2] > 0 && s3_seen[3] > 0,
          "scheme III: none, odd, full and even inversion all used");
    check(mux_seen[0] > 0 && mux_seen[1] > 0 && mux_seen[2] > 0 && mux_seen[3] > 0,
          "all four mux codes used");
    check(resets >= 3, "reset applied during the run");
    check(cc2 <= cc_plain && cc3 <= cc2, "coupling cost: scheme III <= scheme II <= uncoded");
    $display("scheme I  plain=%0d odd=%0d", s1_seen[0], s1_seen[1]);
    $display("scheme II  none=%0d odd=%0d full=%0d", s2_seen[0], s2_seen[1], s2_seen[2]);
    $display("scheme III none=%0d odd=%0d full=%0d even=%0d",
             s3_seen[0], s3_seen[1], s3_seen[2], s3_seen[3]);
    $display("mux codes 00=%0d 01=%0d 10=%0d 11=%0d resets=%0d",
             mux_seen[0], mux_seen[1], mux_seen[2], mux_seen[3], resets);
    $display("32-bit data lines: toggles uncoded=%0d schemeII=%0d schemeIII=%0d",
             tog_plain, tog2, tog3);
    $display("coupling cost uncoded=%0d schemeII=%0d schemeIII=%0d", cc_plain, cc2, cc3);
    $display("uniform random words, coupling cost: 16-bit uncoded=%0d schemeI=%0d; 32-bit uncoded=%0d schemeII=%0d schemeIII=%0d",
             r_cc1_plain, r_cc1, r_cc_plain, r_cc2, r_cc3);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
