// vote_accum: the (rho, theta) vote memory of the Hough transform.
//
// Every cell counts how many feature points lie on the line with that radius
// and angle. The memory is split in two banks so that the two votes the IHT
// processor produces each cycle, for angle n and for angle K/2 + n, are
// counted in the same cycle: bank 0 holds angles 0 .. K/2-1 and bank 1
// angles K/2 .. K-1. Each bank is a simple dual-port array addressed by
// {angle, radius index}.
//
// A vote is a read-modify-write: the cell is read in the cycle the vote
// arrives and written, incremented, in the next one. If a vote hits the cell
// that is being written in that same cycle, the written value is forwarded,
// so back-to-back votes to one cell are both counted. Counters saturate at
// all ones instead of wrapping.
//
// Interface and timing:
//   clear_start  starts clearing every cell; clearing takes K/2 * 2^RHOW
//                cycles during which `clearing` is high and votes and reads
//                must not be issued.
//   vote_*       one vote pair per cycle, no back-pressure.
//   rd_*         read of cell (rd_theta, rd_rho), theta in 0 .. K-1; the data
//                appears with rd_valid one cycle after rd_en. Reads must not
//                overlap votes.
// The banked organisation and the handshake are this implementation's
// choices; the method itself only says the votes are stored in a memory
// addressed by (rho, theta).
module vote_accum
  import hough_pkg::*;
#(
  parameter int unsigned KA   = hough_pkg::K,
  parameter int unsigned RHOW = hough_pkg::RHO_W,
  parameter int unsigned VW   = hough_pkg::VOTE_W
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            clear_start,
  output logic            clearing,
  input  logic            vote_valid,
  input  logic [7:0]      vote_n,
  input  logic [RHOW-1:0] vote_rho_lo,
  input  logic [RHOW-1:0] vote_rho_hi,
  input  logic            rd_en,
  input  logic [8:0]      rd_theta,
  input  logic [RHOW-1:0] rd_rho,
  output logic            rd_valid,
  output logic [VW-1:0]   rd_data,
  output logic [1:0]      sat_hit,   // per bank: a vote found its cell full
  output logic [1:0]      fwd_hit    // per bank: a vote used the forwarded value
);
  localparam int unsigned HALF  = KA / 2;
  localparam int unsigned NW    = (HALF > 1) ? $clog2(HALF) : 1;
  localparam int unsigned AW    = NW + RHOW;
  localparam int unsigned DEPTH = HALF << RHOW;

  logic [AW-1:0] clr_addr;
  logic          rd_bank_q;

  // Clear sequencer: walks every address of both banks.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      clearing <= 1'b0;
      clr_addr <= '0;
    end else if (clear_start && !clearing) begin
      clearing <= 1'b1;
      clr_addr <= '0;
    end else if (clearing) begin
      clr_addr <= clr_addr + AW'(1);
      if (clr_addr == AW'(DEPTH - 1)) clearing <= 1'b0;
    end
  end

  for (genvar b = 0; b < 2; b++) begin : g_bank
    logic [VW-1:0] mem [DEPTH];
    logic [AW-1:0] vaddr, raddr, s1_addr;
    logic          s1_valid, s1_fwd;
    logic [VW-1:0] q, last_wdata, old_val, wdata;
    logic          rd_here;

    always_comb begin
      vaddr   = {vote_n[NW-1:0], (b == 0) ? vote_rho_lo : vote_rho_hi};
      rd_here = (b == 0) ? (rd_theta < 9'(HALF)) : (rd_theta >= 9'(HALF));
      raddr   = vote_valid ? vaddr
                           : {NW'((b == 0) ? rd_theta : rd_theta - 9'(HALF)), rd_rho};
      old_val = s1_fwd ? last_wdata : q;
      wdata   = (&old_val) ? old_val : old_val + VW'(1);
    end

    // Read port (synchronous) and write port.
    always_ff @(posedge clk) begin
      if (vote_valid || (rd_en && rd_here)) q <= mem[raddr];
      if (clearing)      mem[clr_addr] <= '0;
      else if (s1_valid) mem[s1_addr]  <= wdata;
    end

    // Read-modify-write pipeline stage.
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        s1_valid   <= 1'b0;
        s1_fwd     <= 1'b0;
        s1_addr    <= '0;
        last_wdata <= '0;
      end else begin
        s1_valid <= vote_valid && !clearing;
        s1_addr  <= vaddr;
        s1_fwd   <= vote_valid && s1_valid && (vaddr == s1_addr);
        if (s1_valid) last_wdata <= wdata;
      end
    end

    assign sat_hit[b] = s1_valid && (&old_val);
    assign fwd_hit[b] = s1_valid && s1_fwd;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rd_valid  <= 1'b0;
      rd_bank_q <= 1'b0;
    end else begin
      rd_valid  <= rd_en && !vote_valid && !clearing;
      rd_bank_q <= (rd_theta >= 9'(HALF));
    end
  end
  assign rd_data = rd_bank_q ? g_bank[1].q : g_bank[0].q;

  // Usage rules.
  always_ff @(posedge clk) begin
    if (rst_n) begin
      a_no_vote_in_clear: assert (!(vote_valid && clearing))
        else $error("vote issued while the memory is being cleared");
      a_no_read_during_vote: assert (!(rd_en && vote_valid))
        else $error("read issued in a vote cycle");
    end
    if (rst_n && vote_valid) begin
      a_angle_range: assert (vote_n < 8'(HALF)) else $error("angle index %0d out of range", vote_n);
    end
  end
endmodule
