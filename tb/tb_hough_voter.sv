// tb_hough_voter: end-to-end run of the voting stage on a 48 x 20 binary
// image (random feature points, a full-width horizontal line at y = 9 and
// blank lines), fed with random pixel gaps. After the pipeline is idle every
// one of the 180 x 1024 vote cells is read and compared with the reference
// IHT model. Also checked: the number of feature points, one vote sequence
// per point, zero runs skipped and point stalls observed, the strongest
// cell lying on the drawn line (theta index 90, radius 9), and that a second
// clear empties the memory.
module tb_hough_voter;
  import hough_pkg::*;
  import iht_ref_pkg::*;
  localparam int IW = 48, IH = 20, LINE_Y = 9;
  logic clk = 0, rst_n = 0;
  logic frame_start, clear_start, clearing, pix_valid, pix_ready, pix_bit, pix_eol;
  logic rd_en, rd_valid, idle;
  logic [8:0] rd_theta;
  logic [RHO_W-1:0] rd_rho;
  logic [VOTE_W-1:0] rd_data;
  logic ev_zero_skip, ev_point, ev_point_done, ev_point_stall, ev_sat, ev_fwd;
  int checks = 0, failures = 0;
  int n_skip = 0, n_point = 0, n_done = 0, n_stall = 0;
  int model [K][1024];
  bit img [IH][IW];

  hough_voter dut (.*);
  always #5 clk = ~clk;

  always @(posedge clk) if (rst_n) begin
    n_skip  += int'(ev_zero_skip);
    n_point += int'(ev_point);
    n_done  += int'(ev_point_done);
    n_stall += int'(ev_point_stall);
  end

  task automatic clear_mem();
    @(negedge clk); clear_start = 1;
    @(negedge clk); clear_start = 0;
    while (clearing) @(negedge clk);
  endtask

  // Reads every cell, one per cycle, and compares with `model` (or with
  // zero when `zero` is set). Returns the cell with the most votes.
  task automatic read_all(input bit zero, output int best_t, output int best_r);
    int pt, pr, best;
    best = -1; best_t = 0; best_r = 0;
    for (int i = 0; i <= K * 1024; i++) begin
      @(negedge clk);
      if (i > 0) begin
        int e;
        e = zero ? 0 : model[pt][pr];
        checks++;
        if (!rd_valid || int'(rd_data) != e) begin
          failures++;
          if (failures < 10) $display("FAIL cell theta=%0d rho=%0d: %0d (valid %b), want %0d",
                                      pt, pr - OFF, rd_data, rd_valid, e);
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
    frame_start = 0; clear_start = 0; pix_valid = 0; pix_bit = 0; pix_eol = 0;
    rd_en = 0; rd_theta = 0; rd_rho = 0;
    foreach (model[t, r]) model[t][r] = 0;
    npts = 0;
    for (int y = 0; y < IH; y++)
      for (int x = 0; x < IW; x++) begin
        img[y][x] = (y == LINE_Y) || (y % 7 != 3 && $urandom_range(99) < 15);
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
    for (int y = 0; y < IH; y++)
      for (int x = 0; x < IW; x++) begin
        while ($urandom_range(7) == 0) begin pix_valid = 0; @(negedge clk); end
        pix_valid = 1; pix_bit = img[y][x]; pix_eol = (x == IW - 1);
        while (!pix_ready) @(negedge clk);
        @(negedge clk);
      end
    pix_valid = 0;
    while (!idle) @(negedge clk);
    read_all(0, bt, br);
    checks++;
    if (n_point != npts || n_done != npts || n_skip == 0 || n_stall == 0) begin
      failures++;
      $display("FAIL points %0d (done %0d) of %0d, zero skips %0d, stalls %0d", n_point, n_done,
               npts, n_skip, n_stall);
    end
    checks++;
    if (bt != 90 || br - OFF != LINE_Y) begin
      failures++;
      $display("FAIL strongest cell theta=%0d rho=%0d", bt, br - OFF);
    end
    clear_mem();
    read_all(1, bt, br);
    $display("points %0d, zero skips %0d, point stalls %0d", n_point, n_skip, n_stall);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (700000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
