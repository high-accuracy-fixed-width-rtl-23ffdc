// mlcp_hough_top: the two designs of this project side by side.
//
//  * A fixed-width radix-4 Booth multiplier whose truncation error is
//    compensated from the nonzero codes of its Booth digits
//    (mlcp_booth_mult). It is combinational; here its operands and result
//    are registered so that it sits between flip-flops.
//  * The voting stage of an incremental-Hough-transform line detector for
//    binary CIF images (hough_voter).
//
// The two share only the clock and reset; their ports are brought out
// separately. Multiplier timing: operands taken when mul_valid is high,
// product valid with mul_out_valid two cycles later.
module mlcp_hough_top
  import hough_pkg::*;
#(
  parameter int unsigned L = 16,
  parameter int unsigned W = 2
) (
  input  logic              clk,
  input  logic              rst_n,
  // fixed-width Booth multiplier
  input  logic              mul_valid,
  input  logic [L-1:0]      mul_a,
  input  logic [L-1:0]      mul_b,
  output logic              mul_out_valid,
  output logic [L-1:0]      mul_p,
  // Hough voting
  input  logic              frame_start,
  input  logic              clear_start,
  output logic              clearing,
  input  logic              pix_valid,
  output logic              pix_ready,
  input  logic              pix_bit,
  input  logic              pix_eol,
  input  logic              rd_en,
  input  logic [8:0]        rd_theta,
  input  logic [RHO_W-1:0]  rd_rho,
  output logic              rd_valid,
  output logic [VOTE_W-1:0] rd_data,
  output logic              idle,
  output logic              ev_zero_skip,
  output logic              ev_point,
  output logic              ev_point_done,
  output logic              ev_point_stall,
  output logic              ev_sat,
  output logic              ev_fwd
);
  logic [L-1:0] a_q, b_q, p_c;
  logic         v_q;

  mlcp_booth_mult #(.L(L), .W(W)) u_mult (.a(a_q), .b(b_q), .p(p_c));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      a_q           <= '0;
      b_q           <= '0;
      v_q           <= 1'b0;
      mul_p         <= '0;
      mul_out_valid <= 1'b0;
    end else begin
      v_q           <= mul_valid;
      mul_out_valid <= v_q;
      if (mul_valid) begin
        a_q <= mul_a;
        b_q <= mul_b;
      end
      if (v_q) mul_p <= p_c;
    end
  end

  hough_voter u_hough (
    .clk, .rst_n, .frame_start, .clear_start, .clearing,
    .pix_valid, .pix_ready, .pix_bit, .pix_eol,
    .rd_en, .rd_theta, .rd_rho, .rd_valid, .rd_data,
    .idle, .ev_zero_skip, .ev_point, .ev_point_done, .ev_point_stall, .ev_sat, .ev_fwd
  );
endmodule
