// tb_mlcp_compensator: for L = 8 and two values of W, measures the expected
// truncated part for every nonzero-code count by running all 65536 operand
// pairs, and checks the compensator's table output for every z pattern.
module tb_mlcp_compensator;
  import booth_ref_pkg::*;
  localparam int L = 8;
  int checks = 0, failures = 0;

  localparam int NTR2 = (L - 2 + 1) / 2;
  localparam int NTR0 = (L - 0 + 1) / 2;
  logic [NTR2-1:0] z2;
  logic [NTR0-1:0] z0;
  logic [7:0]      c2, c0;

  mlcp_compensator #(.L(L), .W(2)) dut_w2 (.z(z2), .comp(c2));
  mlcp_compensator #(.L(L), .W(0)) dut_w0 (.z(z0), .comp(c0));

  task automatic run(input int w);
    longint sum [0:8];
    longint cnt [0:8];
    longint expc [0:8];
    int ntr;
    ntr = (L - w + 1) / 2;
    for (int k = 0; k <= 8; k++) begin sum[k] = 0; cnt[k] = 0; end
    for (int a = -128; a < 128; a++)
      for (int b = 0; b < 256; b++) begin
        int k;
        k = nz_low(L, w, b);
        sum[k] += trunc_part(L, w, a, b);
        cnt[k]++;
      end
    for (int k = 0; k <= ntr; k++) expc[k] = comp_from_stats(L, w, sum[k], cnt[k]);
    for (int zp = 0; zp < (1 << ntr); zp++) begin
      int k;
      longint got;
      k = $countones(zp);
      if (w == 2) z2 = NTR2'(zp); else z0 = NTR0'(zp);
      #1;
      got = (w == 2) ? longint'(c2) : longint'(c0);
      checks++;
      if (got != expc[k]) begin
        failures++;
        $display("FAIL W=%0d z=%b: comp=%0d want %0d", w, zp, got, expc[k]);
      end
    end
    for (int k = 0; k <= ntr; k++)
      $display("W=%0d k=%0d: E[TP]=%0.2f comp=%0d", w, k, real'(sum[k]) / real'(cnt[k]), expc[k]);
  endtask

  initial begin
    run(2);
    run(0);
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
