// tb_bedt_transition_counter: checks the Ty, Te, T2 and T4** counts of the
// 32-bit pair-detector array against counts the testbench works out from
// the reference cost model, on directed and random word pairs. It also checks
// that the majority test 2*Ty > W-1 agrees with "odd inversion lowers the
// total coupling cost".
module tb_bedt_transition_counter;
  import bedt_ref_pkg::*;

  localparam int W  = 32;
  localparam int CW = $clog2(W);

  int checks = 0, failures = 0;

  logic [W-1:0]  x, y;
  logic [CW-1:0] ty_cnt, te_cnt, t2_cnt, t4s_cnt;

  bedt_transition_counter dut (
    .x(x), .y(y), .ty_cnt(ty_cnt), .te_cnt(te_cnt), .t2_cnt(t2_cnt), .t4s_cnt(t4s_cnt));

  task automatic apply(logic [W-1:0] px, logic [W-1:0] py);
    int ety, ete, et2, et4;
    logic [63:0] om;
    x = px;
    y = py;
    #1;
    om = odd_mask(W);
    ety = 0; ete = 0; et2 = 0; et4 = 0;
    for (int i = 0; i + 1 < W; i++) begin
      logic [63:0] xp, yp, mo, me;
      int c0;
      xp = 64'(px[i +: 2]);
      yp = 64'(py[i +: 2]);
      mo = 64'(om[i +: 2]);
      me = 64'(~om[i +: 2]) & 64'h3;
      c0 = cost(2, yp, xp);
      if (cost(2, yp, xp ^ mo) < c0) ety++;
      if (cost(2, yp, xp ^ me) < c0) ete++;
      if (c0 == 2) et2++;
      if (xp == yp && yp[0] != yp[1]) et4++;
    end
    checks++;
    if (int'(ty_cnt) != ety || int'(te_cnt) != ete || int'(t2_cnt) != et2 ||
        int'(t4s_cnt) != et4) begin
      failures++;
      $display("FAIL x=%h y=%h got ty=%0d te=%0d t2=%0d t4=%0d exp %0d %0d %0d %0d",
               px, py, ty_cnt, te_cnt, t2_cnt, t4s_cnt, ety, ete, et2, et4);
    end
    checks++;
    if ((2 * int'(ty_cnt) > W - 1) !=
        (cost(W, 64'(py), 64'(px) ^ odd_mask(W)) < cost(W, 64'(py), 64'(px)))) begin
      failures++;
      $display("FAIL majority test disagrees with cost, x=%h y=%h", px, py);
    end
  endtask

  initial begin
    // worked example: 0xABABABAB after an all-zero word gives Ty = 24, T2 = T4 = 0
    apply(32'hABABABAB, 32'h0);
    checks++;
    if (ty_cnt != 24 || t2_cnt != 0 || t4s_cnt != 0 || te_cnt != 24) begin
      failures++;
      $display("FAIL worked example ty=%0d te=%0d t2=%0d t4=%0d", ty_cnt, te_cnt, t2_cnt, t4s_cnt);
    end
    apply(32'h0, 32'h0);
    apply(32'hFFFFFFFF, 32'h0);
    apply(32'h55555555, 32'hAAAAAAAA);   // all pairs Type II
    checks++;
    if (t2_cnt != 31) begin failures++; $display("FAIL all Type II"); end
    apply(32'hAAAAAAAA, 32'hAAAAAAAA);   // all pairs quiet with differing bits
    checks++;
    if (t4s_cnt != 31) begin failures++; $display("FAIL all T4**"); end
    for (int k = 0; k < 2000; k++) apply($urandom, $urandom);
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
