// tb_mlcp_booth_mult: fixed-width Booth multiplier.
//  * L = 8, W = 2 and W = 0: all 65536 operand pairs, bit-exact against
//    (A*B - TP + C_k * 2^(L-W)) >> L, where TP (the dropped partial-product
//    bits) and the compensation C_k are computed by the reference package
//    from the Booth definition and from exhaustive statistics.
//  * L = 16, W = 2 (the default size): 200000 random pairs; the error
//    against the rounded exact product round(A*B / 2^16) must have a mean
//    within 1/8 unit of zero (the compensation is quantised to 1/4
//    unit), a mean magnitude below 1/4 unit, stay within +-2 units, and be smaller on average than
//    that of plain truncation of the same array (no compensation).
module tb_mlcp_booth_mult;
  import booth_ref_pkg::*;
  int checks = 0, failures = 0;

  logic [7:0]  a8, b8, p8w2, p8w0;
  logic [15:0] a16, b16, p16;

  mlcp_booth_mult #(.L(8), .W(2)) dut8w2 (.a(a8), .b(b8), .p(p8w2));
  mlcp_booth_mult #(.L(8), .W(0)) dut8w0 (.a(a8), .b(b8), .p(p8w0));
  mlcp_booth_mult                 dut16  (.a(a16), .b(b16), .p(p16));

  task automatic exhaustive(input int w);
    longint sum [0:8];
    longint cnt [0:8];
    longint c [0:8];
    localparam int L = 8;
    for (int k = 0; k <= 8; k++) begin sum[k] = 0; cnt[k] = 0; end
    for (int a = -128; a < 128; a++)
      for (int b = 0; b < 256; b++) begin
        int k;
        k = nz_low(L, w, b);
        sum[k] += trunc_part(L, w, a, b);
        cnt[k]++;
      end
    for (int k = 0; k <= 8; k++) c[k] = comp_from_stats(L, w, sum[k], cnt[k]);
    for (int a = -128; a < 128; a++)
      for (int b = -128; b < 128; b++) begin
        longint pexact, expv;
        logic [7:0] got;
        a8 = 8'(a);
        b8 = 8'(b);
        #1;
        pexact = longint'(a) * longint'(b);
        expv = (pexact - trunc_part(L, w, a, b) + (c[nz_low(L, w, longint'(b8))] << (L - w))) >>> L;
        got = (w == 2) ? p8w2 : p8w0;
        checks++;
        if (got != 8'(expv)) begin
          failures++;
          if (failures < 10) $display("FAIL L=8 W=%0d a=%0d b=%0d: p=%0d want %0d", w, a, b,
                                      $signed(got), expv);
        end
      end
  endtask

  initial begin
    real sum_err, sum_abs, sum_abs_dt;
    int  max_err;
    exhaustive(2);
    exhaustive(0);
    sum_err = 0; sum_abs = 0; sum_abs_dt = 0; max_err = 0;
    for (int t = 0; t < 200000; t++) begin
      longint av, bv, pexact, pround, pdt;
      int e;
      a16 = 16'($urandom);
      b16 = 16'($urandom);
      #1;
      av = longint'($signed(a16));
      bv = longint'($signed(b16));
      pexact = av * bv;
      pround = (pexact + (longint'(1) << 15)) >>> 16;
      pdt    = (pexact - trunc_part(16, 2, av, longint'(b16))) >>> 16;
      e = int'(longint'($signed(p16)) - pround);
      sum_err += e;
      sum_abs += (e < 0) ? -e : e;
      sum_abs_dt += (pdt - pround < 0) ? -(pdt - pround) : (pdt - pround);
      if ((e < 0 ? -e : e) > max_err) max_err = (e < 0 ? -e : e);
      checks++;
      if (e > 2 || e < -2) begin
        failures++;
        if (failures < 10) $display("FAIL L=16 a=%0d b=%0d: p=%0d, rounded product %0d", av, bv,
                                    $signed(p16), pround);
      end
    end
    $display("L=16 W=2: mean error %0.4f, mean |error| %0.4f (uncompensated %0.4f), max |error| %0d",
             sum_err / 200000.0, sum_abs / 200000.0, sum_abs_dt / 200000.0, max_err);
    checks++;
    if (sum_err / 200000.0 > 0.125 || sum_err / 200000.0 < -0.125 || sum_abs / 200000.0 > 0.25) begin
      failures++;
      $display("FAIL mean error too large");
    end
    checks++;
    if (!(sum_abs < sum_abs_dt)) begin
      failures++;
      $display("FAIL compensation does not beat plain truncation");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
