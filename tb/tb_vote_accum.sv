// tb_vote_accum: a small vote memory (8 angles, 8 radii, 3-bit counters).
// Clears it, checks every cell reads zero, then issues random vote pairs
// with random idle cycles, often repeating the previous address to exercise
// forwarding: first spread over all cells and below saturation, then on few
// cells so that the counters saturate. After each phase every cell is
// compared with a software count saturated at 7. The clear
// must take exactly K/2 * 2^RHOW cycles and read data must come one cycle
// after rd_en.
module tb_vote_accum;
  localparam int KA = 8, RHOW = 3, VW = 3, HALF = KA / 2;
  logic clk = 0, rst_n = 0;
  logic clear_start, clearing, vote_valid, rd_en, rd_valid;
  logic [7:0] vote_n;
  logic [RHOW-1:0] vote_rho_lo, vote_rho_hi, rd_rho;
  logic [8:0] rd_theta;
  logic [VW-1:0] rd_data;
  logic [1:0] sat_hit, fwd_hit;
  int checks = 0, failures = 0, n_sat = 0, n_fwd = 0;
  int model [KA][1 << RHOW];

  vote_accum #(.KA(KA), .RHOW(RHOW), .VW(VW)) dut (.*);
  always #5 clk = ~clk;

  always @(posedge clk) begin
    n_sat += $countones(sat_hit);
    n_fwd += $countones(fwd_hit);
  end

  task automatic do_clear();
    int cyc;
    clear_start <= 1;
    @(posedge clk);
    clear_start <= 0;
    cyc = 0;
    @(posedge clk);
    while (clearing) begin cyc++; @(posedge clk); end
    checks++;
    if (cyc != HALF << RHOW) begin
      failures++;
      $display("FAIL clear took %0d cycles, want %0d", cyc, HALF << RHOW);
    end
    foreach (model[t, r]) model[t][r] = 0;
  endtask

  task automatic check_all();
    for (int t = 0; t < KA; t++)
      for (int r = 0; r < (1 << RHOW); r++) begin
        rd_en <= 1; rd_theta <= 9'(t); rd_rho <= RHOW'(r);
        @(posedge clk);
        rd_en <= 0;
        #1;
        checks++;
        if (!rd_valid || int'(rd_data) != model[t][r]) begin
          failures++;
          if (failures < 10) $display("FAIL cell (%0d,%0d): %0d valid=%b, want %0d", t, r,
                                      rd_data, rd_valid, model[t][r]);
        end
      end
  endtask

  task automatic do_votes(int count, bit narrow);
    int pn, plo, phi;
    pn = 0; plo = 0; phi = 0;
    for (int i = 0; i < count; i++) begin
      int n, lo, hi;
      if (i > 0 && $urandom_range(2) == 0) begin
        n = pn; lo = plo; hi = phi;                  // same cells again
      end else begin
        n = $urandom_range(HALF - 1);
        lo = narrow ? $urandom_range(3) : $urandom_range(7);
        hi = $urandom_range(7);
      end
      vote_valid <= 1; vote_n <= 8'(n); vote_rho_lo <= RHOW'(lo); vote_rho_hi <= RHOW'(hi);
      if (model[n][lo] < 7) model[n][lo]++;
      if (model[HALF + n][hi] < 7) model[HALF + n][hi]++;
      pn = n; plo = lo; phi = hi;
      @(posedge clk);
      if ($urandom_range(4) == 0) begin
        vote_valid <= 0;
        repeat ($urandom_range(2)) @(posedge clk);
      end
    end
    vote_valid <= 0;
    repeat (2) @(posedge clk);
  endtask

  initial begin
    clear_start = 0; vote_valid = 0; rd_en = 0; vote_n = 0; vote_rho_lo = 0; vote_rho_hi = 0;
    rd_theta = 0; rd_rho = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    do_clear();
    check_all();
    // phase 1: spread over all cells, below saturation, many back-to-back repeats
    do_votes(40, 0);
    check_all();
    // phase 2: few cells, counters run into saturation
    do_votes(600, 1);
    check_all();
    checks++;
    if (n_sat == 0 || n_fwd == 0) begin
      failures++;
      $display("FAIL saturation seen %0d times, forwarding %0d times", n_sat, n_fwd);
    end
    // a second clear must empty the memory again
    do_clear();
    check_all();
    $display("saturations %0d, forwards %0d", n_sat, n_fwd);
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
