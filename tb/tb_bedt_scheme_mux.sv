// tb_bedt_scheme_mux: checks the 3:1 output multiplexer for all four select
// codes with random inputs: 00 gives the zero-extended 16-bit scheme I word,
// 01 and 10 the scheme II and III words, 11 zero.
module tb_bedt_scheme_mux;
  int checks = 0, failures = 0;

  logic [1:0]  sel;
  logic [15:0] s1;
  logic [31:0] s2, s3, y, exp;

  bedt_scheme_mux dut (.sel(sel), .s1(s1), .s2(s2), .s3(s3), .y(y));

  initial begin
    for (int k = 0; k < 400; k++) begin
      sel = 2'(k % 4);
      s1 = 16'($urandom);
      s2 = $urandom;
      s3 = $urandom;
      #1;
      case (sel)
        2'b00: exp = {16'h0, s1};
        2'b01: exp = s2;
        2'b10: exp = s3;
        default: exp = 32'h0;
      endcase
      checks++;
      if (y !== exp) begin
        failures++;
        $display("FAIL sel=%b y=%h exp=%h", sel, y, exp);
      end
    end
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
