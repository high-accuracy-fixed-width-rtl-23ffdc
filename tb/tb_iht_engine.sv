// tb_iht_engine: drives feature points (corners of the CIF frame and random
// ones), sometimes back to back and sometimes with gaps, and checks
//  * every vote pair against the reference recurrence (iht_ref_pkg),
//  * that each radius is within 1.5 % of |(x, y)| plus one of the exact
//    x cos(theta) + y sin(theta) (the small-angle approximation's error),
//  * timing: votes start the cycle after a point is accepted, a point gives
//    exactly K/2 consecutive vote cycles, and back-to-back points leave no gap.
module tb_iht_engine;
  import iht_ref_pkg::*;
  logic clk = 0, rst_n = 0;
  logic in_valid, in_ready;
  logic [8:0] in_x, in_y;
  logic out_valid, out_last;
  logic [7:0] out_n;
  logic [9:0] out_rho_lo, out_rho_hi;
  int checks = 0, failures = 0;

  iht_engine dut (.*);
  always #5 clk = ~clk;

  // expected votes, one entry per vote cycle
  int exp_n[$], exp_lo[$], exp_hi[$];
  real exp_rlo[$], exp_rhi[$], exp_tol[$];
  int  vote_cycles = 0;

  function automatic real rabs(real v);
    return (v < 0.0) ? -v : v;
  endfunction

  task automatic push_point(int x, int y);
    int idx [K];
    real th, tol;
    votes_of(x, y, idx);
    tol = 0.015 * $sqrt(real'(x * x + y * y)) + 1.0;
    for (int n = 0; n < HALF; n++) begin
      exp_n.push_back(n);
      exp_lo.push_back(idx[n]);
      exp_hi.push_back(idx[HALF + n]);
      th = 3.14159265358979 * n / K;
      exp_rlo.push_back(x * $cos(th) + y * $sin(th));
      th = 3.14159265358979 * (HALF + n) / K;
      exp_rhi.push_back(x * $cos(th) + y * $sin(th));
      exp_tol.push_back(tol);
    end
  endtask

  // output checker
  always @(posedge clk) begin
    if (rst_n && out_valid) begin
      vote_cycles++;
      checks++;
      if (exp_n.size() == 0) begin
        failures++;
        $display("FAIL unexpected vote");
      end else begin
        int n, lo, hi;
        real rlo, rhi, tol;
        n = exp_n.pop_front(); lo = exp_lo.pop_front(); hi = exp_hi.pop_front();
        rlo = exp_rlo.pop_front(); rhi = exp_rhi.pop_front(); tol = exp_tol.pop_front();
        if (int'(out_n) != n || int'(out_rho_lo) != lo || int'(out_rho_hi) != hi ||
            out_last != (n == HALF - 1)) begin
          failures++;
          if (failures < 10)
            $display("FAIL n=%0d lo=%0d hi=%0d last=%b, want n=%0d lo=%0d hi=%0d", out_n,
                     out_rho_lo, out_rho_hi, out_last, n, lo, hi);
        end
        checks++;
        if (rabs(real'(int'(out_rho_lo) - OFF) - rlo) > tol ||
            rabs(real'(int'(out_rho_hi) - OFF) - rhi) > tol) begin
          failures++;
          if (failures < 10) $display("FAIL geometry n=%0d: %0d / %0d vs %f / %f", n,
                                      int'(out_rho_lo) - OFF, int'(out_rho_hi) - OFF, rlo, rhi);
        end
      end
    end
  end

  int pts [][2];
  initial begin
    int npts;
    longint t0, t1;
    pts = new[40];
    pts[0] = '{0, 0}; pts[1] = '{351, 0}; pts[2] = '{0, 287}; pts[3] = '{351, 287};
    for (int i = 4; i < 40; i++) pts[i] = '{$urandom_range(351), $urandom_range(287)};
    in_valid = 0; in_x = 0; in_y = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(posedge clk);
    // 20 points back to back, timed
    npts = 0;
    for (int i = 0; i < 20; i++) begin
      in_valid <= 1; in_x <= 9'(pts[i][0]); in_y <= 9'(pts[i][1]);
      @(negedge clk);
      while (!in_ready) @(negedge clk);
      @(posedge clk);
      if (i == 0) t0 = $time / 10;
      push_point(pts[i][0], pts[i][1]);
    end
    in_valid <= 0;
    @(posedge clk);
    while (out_valid) @(posedge clk);
    t1 = $time / 10;
    checks++;
    if (t1 - t0 != 20 * HALF + 1) begin
      failures++;
      $display("FAIL 20 back-to-back points took %0d cycles, want %0d", t1 - t0 - 1, 20 * HALF);
    end
    // 20 points with random gaps
    for (int i = 20; i < 40; i++) begin
      repeat ($urandom_range(120)) @(posedge clk);
      in_valid <= 1; in_x <= 9'(pts[i][0]); in_y <= 9'(pts[i][1]);
      @(negedge clk);
      while (!in_ready) @(negedge clk);
      @(posedge clk);
      push_point(pts[i][0], pts[i][1]);
      in_valid <= 0;
    end
    repeat (HALF + 5) @(posedge clk);
    checks++;
    if (exp_n.size() != 0 || vote_cycles != 40 * HALF) begin
      failures++;
      $display("FAIL %0d votes missing, %0d vote cycles", exp_n.size(), vote_cycles);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
