// tb_feature_scanner: feeds run-length coded random lines (widths 1 to 40,
// several frames) with random back-pressure on the points, and checks that
// exactly the pixels of value 1 come out, in raster order, with their (x, y),
// that each zero run is skipped in a single cycle, and that frame_start
// returns the position to the origin.
module tb_feature_scanner;
  import hough_pkg::*;
  logic clk = 0, rst_n = 0;
  logic frame_start, run_valid, run_ready, pt_valid, pt_ready, zero_skip;
  run_t run;
  logic [8:0] pt_x, pt_y;
  int checks = 0, failures = 0, zero_runs = 0, skips = 0;
  int exp_x[$], exp_y[$];

  feature_scanner dut (.*);
  always #5 clk = ~clk;

  always @(posedge clk) begin
    if (rst_n && pt_valid && pt_ready) begin
      checks++;
      if (exp_x.size() == 0) begin
        failures++;
        $display("FAIL unexpected point (%0d,%0d)", pt_x, pt_y);
      end else begin
        int ex, ey;
        ex = exp_x.pop_front(); ey = exp_y.pop_front();
        if (int'(pt_x) != ex || int'(pt_y) != ey) begin
          failures++;
          if (failures < 10) $display("FAIL point (%0d,%0d), want (%0d,%0d)", pt_x, pt_y, ex, ey);
        end
      end
    end
    if (rst_n && zero_skip) skips++;
  end

  always @(posedge clk) pt_ready <= ($urandom_range(2) != 0);

  // Presents one run from a falling edge; zero runs are presented only once
  // the scanner is free, and must then be taken at the very next edge.
  task automatic send(run_t r);
    int cyc;
    @(negedge clk);
    if (!r.value) while (!run_ready) @(negedge clk);
    run_valid = 1; run = r;
    cyc = 1;
    while (!run_ready) begin @(negedge clk); cyc++; end
    @(posedge clk);
    #1 run_valid = 0;
    if (!r.value) begin
      zero_runs++;
      checks++;
      if (cyc != 1) begin
        failures++;
        $display("FAIL zero run took %0d cycles", cyc);
      end
    end
  endtask

  initial begin
    frame_start = 0; run_valid = 0; run = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int f = 0; f < 3; f++) begin
      frame_start <= 1;
      @(posedge clk);
      frame_start <= 0;
      for (int y = 0; y < 12; y++) begin
        int w, x;
        logic v;
        w = $urandom_range(1, 40);
        x = 0;
        v = 1'($urandom);
        while (x < w) begin
          int len;
          len = $urandom_range(1, w - x);
          if (v) for (int i = 0; i < len; i++) begin exp_x.push_back(x + i); exp_y.push_back(y); end
          send('{value: v, len: RUN_W'(len), eol: (x + len == w)});
          x += len;
          v = !v;
        end
      end
      while (exp_x.size() != 0 || pt_valid) @(posedge clk);
    end
    checks++;
    if (skips != zero_runs || exp_x.size() != 0) begin
      failures++;
      $display("FAIL %0d skips for %0d zero runs, %0d points missing", skips, zero_runs, exp_x.size());
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
