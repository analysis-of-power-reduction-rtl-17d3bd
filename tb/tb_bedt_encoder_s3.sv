// tb_bedt_encoder_s3: self-checking test of the scheme III encoder at W = 32.
//
// The testbench keeps its own copy of the previously sent word and, for each
// new word, works out the expected choice (none, odd, full or even inversion) from
// the coupling costs of the candidate words (bedt_ref_pkg). It checks the
// encoded word and control lines one clock after the word is applied, that
// decoding restores the word, that the chosen word never costs more than
// the plain one, and that each of the four choices occurs. The first word
// after reset is the published example 0xABABABAB, which must be sent as
// 0x01010101 with odd inversion.
module tb_bedt_encoder_s3;
  import bedt_pkg::*;
  import bedt_ref_pkg::*;

  localparam int W      = 32;
  localparam int SCHEME = 3;

  int checks = 0, failures = 0;
  int mode_seen [4];
  int cost_plain = 0, cost_coded = 0;

  logic         clk = 1'b0;
  logic         rst_n;
  logic [W-1:0] x, z;
  inv_mode_t    ctrl;

  always #5 clk = ~clk;

  bedt_encoder_s3 dut (.clk(clk), .rst_n(rst_n), .x(x), .z(z), .ctrl(ctrl));

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  logic [W-1:0] prev;

  task automatic send(logic [W-1:0] word);
    logic [1:0]   m;
    logic [W-1:0] exp;
    m   = decide(SCHEME, W, 64'(prev), 64'(word));
    exp = word ^ W'(mode_mask(W, m));
    @(negedge clk);
    x = word;
    @(posedge clk);
    #1;
    check(z === exp && ctrl === inv_mode_t'(m),
          $sformatf("word %h: z=%h ctrl=%b expected z=%h ctrl=%b", word, z, ctrl, exp, m));
    check((z ^ W'(mode_mask(W, ctrl))) === word, "decode restores the word");
    check(cost(W, 64'(prev), 64'(z)) <= cost(W, 64'(prev), 64'(word)),
          "coded word costs no more than the plain word");
    mode_seen[m]++;
    cost_plain += cost(W, 64'(prev), 64'(word));
    cost_coded += cost(W, 64'(prev), 64'(z));
    prev = exp;
  endtask

  initial begin
    logic [W-1:0] w;
    rst_n = 1'b0;
    x = '0;
    prev = '0;
    repeat (2) @(posedge clk);
    #1;
    check(z == '0 && ctrl == INV_NONE, "reset clears the output register");
    @(negedge clk);
    rst_n = 1'b1;
    // published example
    send(32'hABABABAB);
    check(z == 32'h01010101 && ctrl == INV_ODD, "worked example gives 0x01010101, HI=1 FI=0");
    // a word equal to the previous one must go out unchanged
    send(prev);
    // directed: word differing from the previous in all lines
    send(~prev);
    for (int k = 0; k < 3000; k++) begin
      case ($urandom % 6)
        0: w = $urandom;
        1: w = prev ^ W'(odd_mask(W));
        2: w = prev ^ W'(even_mask(W));
        3: w = ~prev ^ W'($urandom & $urandom & $urandom);
        4: w = prev ^ W'($urandom & $urandom);
        default: w = {W/2{2'($urandom)}};
      endcase
      send(w);
    end
    check(mode_seen[0] > 0, "no inversion chosen at least once");
    check(mode_seen[1] > 0, "odd inversion chosen at least once");
    check(mode_seen[2] > 0, "full inversion chosen at least once");
    check(mode_seen[3] > 0, "even inversion chosen at least once");
    $display("modes none=%0d odd=%0d full=%0d even=%0d; coupling cost plain=%0d coded=%0d",
             mode_seen[0], mode_seen[1], mode_seen[2], mode_seen[3], cost_plain, cost_coded);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
