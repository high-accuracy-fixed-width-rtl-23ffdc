// tb_booth_encoder: checks all eight multiplier-bit triples against the
// modified Booth mapping table (digit value and nonzero flag).
module tb_booth_encoder;
  import booth_pkg::*;
  logic [2:0]   bits;
  booth_digit_t digit;
  int checks = 0, failures = 0;

  booth_encoder dut (.bits, .digit);

  // expected digit value and nonzero flag, in table order 000 .. 111
  int exp_y [8] = '{0, 1, 1, 2, -2, -1, -1, 0};
  int exp_z [8] = '{0, 1, 1, 1, 1, 1, 1, 0};

  initial begin
    for (int c = 0; c < 8; c++) begin
      int y;
      bits = 3'(c);
      #1;
      y = (digit.two ? 2 : (digit.one ? 1 : 0)) * (digit.neg ? -1 : 1);
      checks++;
      if (y != exp_y[c] || int'(digit.z) != exp_z[c] || (digit.one && digit.two) ||
          (digit.neg && !digit.z)) begin
        failures++;
        $display("FAIL bits=%b: y=%0d z=%0d (neg=%b one=%b two=%b), want y=%0d z=%0d",
                 bits, y, digit.z, digit.neg, digit.one, digit.two, exp_y[c], exp_z[c]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
