// tb_booth_pp_row: for every 8-bit multiplicand and every Booth digit, the
// row value (sign-extended row bits plus the separate +1) must equal y * A.
module tb_booth_pp_row;
  import booth_pkg::*;
  localparam int L = 8;
  logic [L-1:0]  a;
  booth_digit_t  digit;
  logic [L:0]    pp;
  logic          neg;
  int checks = 0, failures = 0;

  booth_pp_row #(.L(L)) dut (.a, .digit, .pp, .neg);

  initial begin
    for (int av = -128; av < 128; av++) begin
      for (int y = -2; y <= 2; y++) begin
        int got;
        a = L'(av);
        digit.neg = (y < 0);
        digit.one = (y == 1 || y == -1);
        digit.two = (y == 2 || y == -2);
        digit.z   = (y != 0);
        #1;
        got = int'($signed(pp)) + int'(neg);
        checks++;
        if (got != y * av) begin
          failures++;
          if (failures < 10) $display("FAIL a=%0d y=%0d: row=%0d", av, y, got);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
