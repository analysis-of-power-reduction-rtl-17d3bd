// tb_bedt_pair_detector: exhaustive test of the per-pair transition
// detector. All 16 combinations of previous and current pair values are
// applied for both parities of the pair (low line odd or high line odd).
// The transition type is checked against a hand-written table and the ty,
// te, t2 and t4s flags against costs worked out by the reference model.
module tb_bedt_pair_detector;
  import bedt_pkg::*;
  import bedt_ref_pkg::*;

  int checks = 0, failures = 0;
  int n1 = 0, n2 = 0, n3 = 0, n4 = 0;  // transitions of each type

  logic [1:0] x, y;
  pair_kind_t kind0, kind1;
  logic ty0, te0, t20, t4s0, ty1, te1, t21, t4s1;

  bedt_pair_detector #(.LOW_LINE_ODD(1'b0)) dut0 (
    .x(x), .y(y), .kind(kind0), .ty(ty0), .te(te0), .t2(t20), .t4s(t4s0));
  bedt_pair_detector #(.LOW_LINE_ODD(1'b1)) dut1 (
    .x(x), .y(y), .kind(kind1), .ty(ty1), .te(te1), .t2(t21), .t4s(t4s1));

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s  y=%b x=%b", what, y, x);
    end
  endtask

  // expected type from the table of the four transition kinds, indexed
  // by {y, x}; bit 0 of each pair is the lower line
  function automatic int exp_kind(logic [1:0] py, logic [1:0] px);
    logic [1:0] sw;
    sw = py ^ px;
    if (sw == 2'b00) return 3;                 // IV
    if (sw == 2'b01 || sw == 2'b10) return 0;  // I
    if ((py == 2'b01 && px == 2'b10) || (py == 2'b10 && px == 2'b01)) return 1; // II
    return 2;                                  // III
  endfunction

  initial begin
    for (int a = 0; a < 4; a++) begin
      for (int b = 0; b < 4; b++) begin
        int cn, c_hi, c_lo, kx;
        y = 2'(a);
        x = 2'(b);
        #1;
        cn   = cost(2, 64'(y), 64'(x));
        c_hi = cost(2, 64'(y), 64'(x ^ 2'b10));
        c_lo = cost(2, 64'(y), 64'(x ^ 2'b01));
        check(int'(kind0) == exp_kind(y, x), "kind (low line even)");
        check(int'(kind1) == exp_kind(y, x), "kind (low line odd)");
        // low line even: odd line is the high one
        check(ty0 == (c_hi < cn), "ty (low line even)");
        check(te0 == (c_lo < cn), "te (low line even)");
        check(ty1 == (c_lo < cn), "ty (low line odd)");
        check(te1 == (c_hi < cn), "te (low line odd)");
        check(t20 == (exp_kind(y, x) == 1) && t21 == t20, "t2");
        check(t4s0 == (x == y && y[0] != y[1]) && t4s1 == t4s0, "t4s");
        // inverting one line always changes the pair cost by one unit
        check((c_hi == cn + 1 || c_hi + 1 == cn) && (c_lo == cn + 1 || c_lo + 1 == cn),
              "single-line inversion moves the cost by one");
        kx = exp_kind(y, x);
        if (kx == 0) n1 = n1 + 1;
        else if (kx == 1) n2 = n2 + 1;
        else if (kx == 2) n3 = n3 + 1;
        else n4 = n4 + 1;
      end
    end
    // probabilities 1/2, 1/8, 1/8, 1/4 for random data
    check(n1 == 8 && n2 == 2 && n3 == 2 && n4 == 4,
          $sformatf("type frequencies %0d %0d %0d %0d", n1, n2, n3, n4));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
