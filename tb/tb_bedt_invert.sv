// tb_bedt_invert: checks the inversion/decoding XOR stage for all four
// control values on directed and random words, including the decoding of
// the published scheme II example (0x01010101 with HI = 1, FI = 0 gives back
// 0xABABABAB), and that applying the stage twice restores the word.
module tb_bedt_invert;
  import bedt_pkg::*;
  import bedt_ref_pkg::*;

  localparam int W = 32;

  int checks = 0, failures = 0;

  logic [W-1:0] d, q, q2;
  inv_mode_t    ctrl;

  bedt_invert dut  (.d(d), .ctrl(ctrl), .q(q));
  bedt_invert dut2 (.d(q), .ctrl(ctrl), .q(q2));

  task automatic apply(logic [W-1:0] pd, logic [1:0] pc);
    logic [W-1:0] exp;
    d = pd;
    ctrl = inv_mode_t'(pc);
    #1;
    exp = pd ^ W'(mode_mask(W, pc));
    checks++;
    if (q !== exp) begin
      failures++;
      $display("FAIL d=%h ctrl=%b q=%h exp=%h", pd, pc, q, exp);
    end
    checks++;
    if (q2 !== pd) begin
      failures++;
      $display("FAIL not self-inverse d=%h ctrl=%b", pd, pc);
    end
  endtask

  initial begin
    apply(32'h01010101, 2'b01);
    checks++;
    if (q != 32'hABABABAB) begin failures++; $display("FAIL worked example decode %h", q); end
    apply(32'h0, 2'b10);
    checks++;
    if (q != 32'hFFFFFFFF) begin failures++; $display("FAIL full inversion"); end
    apply(32'h0, 2'b11);
    checks++;
    if (q != 32'h55555555) begin failures++; $display("FAIL even inversion"); end
    for (int k = 0; k < 500; k++) apply($urandom, 2'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
