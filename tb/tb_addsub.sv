// tb_addsub: random operands at the default width and every operand pair
// at 6 bits, both operations, against integer arithmetic modulo 2^N.
module tb_addsub;
  int checks = 0, failures = 0;
  logic [27:0] a, b, s;
  logic        sub;
  logic [5:0]  a6, b6, s6;
  logic        sub6;
  addsub              dut   (.a(a), .b(b), .sub(sub), .s(s));
  addsub #(.N(6))     dut6  (.a(a6), .b(b6), .sub(sub6), .s(s6));

  initial begin
    for (int t = 0; t < 20000; t++) begin
      logic [27:0] e;
      a = 28'($urandom); b = 28'($urandom); sub = 1'($urandom);
      #1;
      e = sub ? 28'(longint'(a) - longint'(b)) : 28'(longint'(a) + longint'(b));
      checks++;
      if (s !== e) begin failures++; $display("FAIL %0d %s %0d = %0d", a, sub ? "-" : "+", b, s); end
    end
    for (int x = 0; x < 64; x++)
      for (int y = 0; y < 64; y++)
        for (int o = 0; o < 2; o++) begin
          a6 = 6'(x); b6 = 6'(y); sub6 = 1'(o);
          #1;
          checks++;
          if (s6 !== 6'(o ? x - y : x + y)) begin
            failures++;
            if (failures < 10) $display("FAIL6 %0d %0d %0d = %0d", x, o, y, s6);
          end
        end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
