// rle_encoder: run-length coder for a binary (feature-point) image stream.
//
// Pixels arrive in raster order, one per accepted cycle, with pix_eol marking
// the last pixel of a line. Consecutive pixels of equal value are merged into
// one run (value, length); a run never crosses a line end and carries an eol
// flag when it closes a line. Zero runs let the feature-point scanner skip a
// whole stretch of background in one step instead of one pixel at a time.
//
// Timing: one pixel per cycle. A run is emitted into a one-entry output
// register when the pixel value changes or the line ends; pix_ready drops
// while that register is full and not being drained, and for one cycle when
// a line ends on a pixel that starts a new run (two runs must then be sent).
// The run format and the handshake are this implementation's choices.
module rle_encoder
  import hough_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       pix_valid,
  output logic       pix_ready,
  input  logic       pix_bit,
  input  logic       pix_eol,
  output logic       run_valid,
  input  logic       run_ready,
  output run_t       run
);
  logic             cur_val;
  logic [RUN_W-1:0] cur_len;   // 0: no open run
  logic             flush_pending;
  logic             out_free;

  assign out_free  = !run_valid || run_ready;
  assign pix_ready = !flush_pending && out_free;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cur_val       <= 1'b0;
      cur_len       <= '0;
      flush_pending <= 1'b0;
      run_valid     <= 1'b0;
      run           <= '0;
    end else begin
      if (run_valid && run_ready) run_valid <= 1'b0;
      if (flush_pending && out_free) begin
        run           <= '{value: cur_val, len: cur_len, eol: 1'b1};
        run_valid     <= 1'b1;
        cur_len       <= '0;
        flush_pending <= 1'b0;
      end else if (pix_valid && pix_ready) begin
        if (cur_len == '0) begin
          cur_val <= pix_bit;
          if (pix_eol) begin
            run       <= '{value: pix_bit, len: RUN_W'(1), eol: 1'b1};
            run_valid <= 1'b1;
            cur_len   <= '0;
          end else begin
            cur_len <= RUN_W'(1);
          end
        end else if (pix_bit == cur_val) begin
          if (pix_eol) begin
            run       <= '{value: cur_val, len: cur_len + RUN_W'(1), eol: 1'b1};
            run_valid <= 1'b1;
            cur_len   <= '0;
          end else begin
            cur_len <= cur_len + RUN_W'(1);
          end
        end else begin
          run           <= '{value: cur_val, len: cur_len, eol: 1'b0};
          run_valid     <= 1'b1;
          cur_val       <= pix_bit;
          cur_len       <= RUN_W'(1);
          flush_pending <= pix_eol;
        end
      end
    end
  end

  always_ff @(posedge clk) begin
    if (rst_n) begin
      a_run_stable: assert (!(run_valid && !run_ready) || pix_ready == 1'b0)
        else $error("pixel accepted while a run waits");
    end
  end
endmodule
