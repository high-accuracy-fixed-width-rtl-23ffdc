// tb_rle_encoder: random binary lines of 1 to 24 pixels (runs of random
// length, including single pixels at line ends) with random pixel gaps and
// random back-pressure on the run output. The runs must reproduce the
// pixels exactly: same values, lengths adding up, eol on the last run of
// each line, neighbouring runs of one line of different value.
module tb_rle_encoder;
  import hough_pkg::*;
  logic clk = 0, rst_n = 0;
  logic pix_valid, pix_ready, pix_bit, pix_eol, run_valid, run_ready;
  run_t run;
  int checks = 0, failures = 0;
  run_t exp_q[$];

  rle_encoder dut (.*);
  always #5 clk = ~clk;

  always @(posedge clk) begin
    if (rst_n && run_valid && run_ready) begin
      checks++;
      if (exp_q.size() == 0) begin
        failures++;
        $display("FAIL unexpected run");
      end else begin
        run_t e;
        e = exp_q.pop_front();
        if (run !== e) begin
          failures++;
          if (failures < 10) $display("FAIL run v=%b len=%0d eol=%b, want v=%b len=%0d eol=%b",
                                      run.value, run.len, run.eol, e.value, e.len, e.eol);
        end
      end
    end
  end

  always @(posedge clk) run_ready <= ($urandom_range(3) != 0);

  initial begin
    pix_valid = 0; pix_bit = 0; pix_eol = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int line = 0; line < 300; line++) begin
      int w;
      logic bits [$];
      w = $urandom_range(1, 24);
      for (int i = 0; i < w; i++) begin
        if (i == 0 || $urandom_range(3) == 0) bits.push_back(1'($urandom));
        else bits.push_back(bits[i - 1]);
      end
      // expected runs
      begin
        int s;
        s = 0;
        for (int i = 1; i <= w; i++)
          if (i == w || bits[i] != bits[s]) begin
            exp_q.push_back('{value: bits[s], len: RUN_W'(i - s), eol: (i == w)});
            s = i;
          end
      end
      for (int i = 0; i < w; i++) begin
        if ($urandom_range(5) == 0) begin
          pix_valid <= 0;
          @(posedge clk);
        end
        pix_valid <= 1; pix_bit <= bits[i]; pix_eol <= (i == w - 1);
        @(negedge clk);
        while (!pix_ready) @(negedge clk);
        @(posedge clk);
      end
    end
    pix_valid <= 0;
    repeat (20) @(posedge clk);
    checks++;
    if (exp_q.size() != 0) begin
      failures++;
      $display("FAIL %0d runs never came out", exp_q.size());
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
