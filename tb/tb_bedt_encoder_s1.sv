// tb_bedt_encoder_s1: self-checking test of the scheme I encoder at W = 16.
//
// The testbench keeps its own copy of the previously sent word and, for each
// new word, expects odd inversion exactly when it lowers the coupling cost
// (bedt_ref_pkg). It checks the encoded word and the inversion line one
// clock after the word is applied, that decoding restores the word, and that
// both choices occur. The first word after reset is 0xABAB, the low half of
// the published example, which must be sent odd-inverted as 0x0101.
module tb_bedt_encoder_s1;
  import bedt_ref_pkg::*;

  localparam int W = 16;

  int checks = 0, failures = 0;
  int n_inv = 0, n_plain = 0;

  logic         clk = 1'b0;
  logic         rst_n;
  logic [W-1:0] x, z;
  logic         inv;

  always #5 clk = ~clk;

  bedt_encoder_s1 dut (.clk(clk), .rst_n(rst_n), .x(x), .z(z), .inv(inv));

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
    m   = decide(1, W, 64'(prev), 64'(word));
    exp = word ^ W'(mode_mask(W, m));
    @(negedge clk);
    x = word;
    @(posedge clk);
    #1;
    check(z === exp && inv === m[0],
          $sformatf("word %h: z=%h inv=%b expected z=%h inv=%b", word, z, inv, exp, m[0]));
    check((inv ? z ^ W'(odd_mask(W)) : z) === word, "decode restores the word");
    if (m[0]) n_inv++; else n_plain++;
    prev = exp;
  endtask

  initial begin
    rst_n = 1'b0;
    x = '0;
    prev = '0;
    repeat (2) @(posedge clk);
    #1;
    check(z == '0 && inv == 1'b0, "reset clears the output register");
    @(negedge clk);
    rst_n = 1'b1;
    send(16'hABAB);
    check(z == 16'h0101 && inv, "0xABAB after reset is sent odd-inverted");
    send(prev);
    for (int k = 0; k < 3000; k++) begin
      case ($urandom % 3)
        0: send(16'($urandom));
        1: send(prev ^ W'(odd_mask(W)) ^ 16'($urandom & $urandom & $urandom));
        default: send(prev ^ 16'($urandom & $urandom));
      endcase
    end
    check(n_inv > 0 && n_plain > 0, "both choices occur");
    $display("odd-inverted=%0d plain=%0d", n_inv, n_plain);
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
