// hough_voter: the voting stage of a straight-line Hough transform built on
// the incremental Hough transform (IHT).
//
// A binary edge image streams in pixel by pixel. rle_encoder groups each line
// into runs, feature_scanner skips zero runs in one step and emits the (x, y)
// of every pixel of value 1, iht_engine walks the K angles of each point two
// at a time with shift-and-add updates, and vote_accum increments the
// (rho, theta) cells. After a frame the votes are read through the rd_* port;
// finding the peaks is left to the user of the memory.
//
// Throughput: one pixel per cycle into the run coder, K/2 cycles per feature
// point in the IHT processor. When points come faster than that, the scanner
// is stalled (point_stall) and the run coder in turn holds off the pixel
// stream. The vote memory must be cleared (clear_start, then wait for
// `clearing` to fall) before the first frame; votes accumulate over frames
// until the next clear. `idle` is high when every stage is empty, i.e. when
// all votes of the pixels accepted so far are in the memory.
module hough_voter
  import hough_pkg::*;
(
  input  logic             clk,
  input  logic             rst_n,
  input  logic             frame_start,
  input  logic             clear_start,
  output logic             clearing,
  // binary image in, raster order
  input  logic             pix_valid,
  output logic             pix_ready,
  input  logic             pix_bit,
  input  logic             pix_eol,
  // vote memory read-out
  input  logic             rd_en,
  input  logic [8:0]       rd_theta,
  input  logic [RHO_W-1:0] rd_rho,
  output logic             rd_valid,
  output logic [VOTE_W-1:0] rd_data,
  // status and events
  output logic             idle,
  output logic             ev_zero_skip,   // a zero run was skipped
  output logic             ev_point,       // a feature point entered the IHT
  output logic             ev_point_done,  // the IHT sent the last votes of a point
  output logic             ev_point_stall, // a point waited for the IHT
  output logic             ev_sat,         // a vote hit a full counter
  output logic             ev_fwd          // a vote used the forwarded cell
);
  logic             run_valid, run_ready;
  run_t             run;
  logic             pt_valid, pt_ready;
  logic [X_W-1:0]   pt_x;
  logic [Y_W-1:0]   pt_y;
  logic             v_valid, v_last;
  logic [7:0]       v_n;
  logic [RHO_W-1:0] v_rho_lo, v_rho_hi;
  logic [1:0]       sat_hit, fwd_hit;
  logic             pix_ok;

  // Pixels wait while the vote memory is being cleared.
  assign pix_ok = pix_valid && !clearing;

  rle_encoder u_rle (
    .clk, .rst_n,
    .pix_valid(pix_ok), .pix_ready(pix_ready), .pix_bit, .pix_eol,
    .run_valid, .run_ready, .run
  );

  feature_scanner u_scan (
    .clk, .rst_n, .frame_start,
    .run_valid, .run_ready, .run,
    .pt_valid, .pt_ready, .pt_x, .pt_y,
    .zero_skip(ev_zero_skip)
  );

  iht_engine u_iht (
    .clk, .rst_n,
    .in_valid(pt_valid), .in_ready(pt_ready), .in_x(pt_x), .in_y(pt_y),
    .out_valid(v_valid), .out_last(v_last), .out_n(v_n),
    .out_rho_lo(v_rho_lo), .out_rho_hi(v_rho_hi)
  );

  vote_accum u_acc (
    .clk, .rst_n,
    .clear_start, .clearing,
    .vote_valid(v_valid), .vote_n(v_n), .vote_rho_lo(v_rho_lo), .vote_rho_hi(v_rho_hi),
    .rd_en, .rd_theta, .rd_rho, .rd_valid, .rd_data,
    .sat_hit, .fwd_hit
  );

  logic acc_tail;  // last vote of the read-modify-write still to be written
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) acc_tail <= 1'b0;
    else        acc_tail <= v_valid;
  end

  assign idle           = !run_valid && !pt_valid && !v_valid && !acc_tail && !clearing;
  assign ev_point       = pt_valid && pt_ready;
  assign ev_point_done  = v_last;
  assign ev_point_stall = pt_valid && !pt_ready;
  assign ev_sat         = |sat_hit;
  assign ev_fwd         = |fwd_hit;
endmodule
