// tb_mlcp_hough_top: whole design at its default sizes.
//  Hough: a full CIF frame (352 x 288) with about 10 % random feature points,
//  a full-width horizontal line at y = 100, a vertical line at x = 200 and
//  some empty lines is streamed in with random gaps. Every one of the
//  180 x 1024 vote cells is compared with the reference IHT model; the
//  strongest cell must be the horizontal line (theta index 90, radius 100).
//  Counted and required at least once: memory clear, zero-run skip, feature
//  point, point stall (scanner waiting for the IHT processor), vote read-out.
//  The frame must take at least K/2 cycles per feature point and no more than
//  that plus one cycle per pixel and a small margin.
//  Multiplier: 5000 random 16-bit operand pairs, issued back to back while
//  the frame runs; each product must appear two cycles later and be within
//  two units of round(A*B / 2^16).
module tb_mlcp_hough_top;
  import hough_pkg::*;
  import iht_ref_pkg::*;
  localparam int IW = 352, IH = 288;
  logic clk = 0, rst_n = 0;
  logic mul_valid, mul_out_valid;
  logic [15:0] mul_a, mul_b, mul_p;
  logic frame_start, clear_start, clearing, pix_valid, pix_ready, pix_bit, pix_eol;
  logic rd_en, rd_valid, idle;
  logic [8:0] rd_theta;
  logic [RHO_W-1:0] rd_rho;
  logic [VOTE_W-1:0] rd_data;
  logic ev_zero_skip, ev_point, ev_point_done, ev_point_stall, ev_sat, ev_fwd;
  int checks = 0, failures = 0;
  int n_skip = 0, n_point = 0, n_done = 0, n_stall = 0, n_clear = 0, n_read = 0, n_mul = 0;
  int model [K][1024];
  bit img [IH][IW];

  mlcp_hough_top dut (.*);
  always #5 clk = ~clk;

  always @(posedge clk) if (rst_n) begin
    n_skip  += int'(ev_zero_skip);
    n_point += int'(ev_point);
    n_done  += int'(ev_point_done);
    n_stall += int'(ev_point_stall);
  end

  // ---------------- multiplier ----------------
  longint exp_p [$];
  always @(posedge clk) if (rst_n && mul_out_valid) begin
    longint e, d;
    checks++;
    n_mul++;
    if (exp_p.size() == 0) begin
      failures++;
      $display("FAIL unexpected product");
    end else begin
      e = exp_p.pop_front();
      d = longint'($signed(mul_p)) - e;
      if (d > 2 || d < -2) begin
        failures++;
        if (failures < 10) $display("FAIL product %0d, rounded exact %0d", $signed(mul_p), e);
      end
    end
  end

  initial begin
    mul_valid = 0; mul_a = 0; mul_b = 0;
    wait (rst_n);
    for (int i = 0; i < 5000; i++) begin
      longint a, b;
      @(negedge clk);
      mul_valid = 1; mul_a = 16'($urandom); mul_b = 16'($urandom);
      a = longint'($signed(mul_a)); b = longint'($signed(mul_b));
      exp_p.push_back((a * b + (longint'(1) << 15)) >>> 16);
    end
    @(negedge clk);
    mul_valid = 0;
  end

  // ---------------- Hough ----------------
  task automatic clear_mem();
    @(negedge clk); clear_start = 1;
    @(negedge clk); clear_start = 0;
    while (clearing) @(negedge clk);
    n_clear++;
  endtask

  task automatic read_all(output int best_t, output int best_r);
    int pt, pr, best;
    best = -1; best_t = 0; best_r = 0;
    for (int i = 0; i <= K * 1024; i++) begin
      @(negedge clk);
      if (i > 0) begin
        checks++;
        n_read += int'(rd_valid);
        if (!rd_valid || int'(rd_data) != model[pt][pr]) begin
          failures++;
          if (failures < 10) $display("FAIL cell theta=%0d rho=%0d: %0d (valid %b), want %0d",
                                      pt, pr - OFF, rd_data, rd_valid, model[pt][pr]);
        end
        if (int'(rd_data) > best) begin best = int'(rd_data); best_t = pt; best_r = pr; end
      end
      if (i < K * 1024) begin
        pt = i / 1024; pr = i % 1024;
        rd_en = 1; rd_theta = 9'(pt); rd_rho = RHO_W'(pr);
      end else rd_en = 0;
    end
  endtask

  initial begin
    int npts, bt, br;
    longint t_start, t_end, cycles;
    frame_start = 0; clear_start = 0; pix_valid = 0; pix_bit = 0; pix_eol = 0;
    rd_en = 0; rd_theta = 0; rd_rho = 0;
    foreach (model[t, r]) model[t][r] = 0;
    npts = 0;
    for (int y = 0; y < IH; y++)
      for (int x = 0; x < IW; x++) begin
        img[y][x] = (y == 100) || (x == 200 && y > 20) ||
                    (y % 50 != 7 && $urandom_range(999) < 95);
        if (img[y][x]) begin
          int idx [K];
          votes_of(x, y, idx);
          for (int t = 0; t < K; t++) model[t][idx[t]]++;
          npts++;
        end
      end
    repeat (3) @(posedge clk);
    rst_n = 1;
    clear_mem();
    @(negedge clk); frame_start = 1;
    @(negedge clk); frame_start = 0;
    t_start = $time / 10;
    for (int y = 0; y < IH; y++)
      for (int x = 0; x < IW; x++) begin
        if ($urandom_range(15) == 0) begin pix_valid = 0; @(negedge clk); end
        pix_valid = 1; pix_bit = img[y][x]; pix_eol = (x == IW - 1);
        while (!pix_ready) @(negedge clk);
        @(negedge clk);
      end
    pix_valid = 0;
    while (!idle) @(negedge clk);
    t_end = $time / 10;
    cycles = t_end - t_start;
    $display("frame: %0d feature points in %0d cycles (%0d per point)", npts, cycles, HALF);
    checks++;
    if (cycles < longint'(npts) * HALF || cycles > longint'(npts) * HALF + IW * IH * 2 + 100) begin
      failures++;
      $display("FAIL frame took %0d cycles for %0d points", cycles, npts);
    end
    read_all(bt, br);
    checks++;
    if (bt != 90 || br - OFF != 100) begin
      failures++;
      $display("FAIL strongest cell theta=%0d rho=%0d", bt, br - OFF);
    end
    checks++;
    if (n_point != npts || n_done != npts || n_skip == 0 || n_stall == 0 || n_clear == 0 ||
        n_read != K * 1024 || n_mul != 5000) begin
      failures++;
      $display("FAIL event counts: points %0d/%0d done %0d skips %0d stalls %0d clears %0d reads %0d products %0d",
               n_point, npts, n_done, n_skip, n_stall, n_clear, n_read, n_mul);
    end
    $display("events: clears %0d, zero-run skips %0d, feature points %0d, point stalls %0d, cells read %0d, products %0d",
             n_clear, n_skip, n_point, n_stall, n_read, n_mul);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
