// feature_scanner: turns run-length coded image lines into the coordinates
// of their feature points (pixels of value 1).
//
// The scanner keeps the current (x, y) position of the raster. A zero run
// advances x by its whole length in a single cycle, so background costs one
// cycle per run rather than one per pixel. A run of ones yields one feature
// point per cycle, (x, y), (x+1, y), ... A run with the eol flag returns x to
// 0 and advances y once it has been consumed. frame_start returns the
// position to (0, 0).
//
// Timing: run_ready is high when no run of ones is being expanded. Points
// leave through a valid/ready handshake; the scanner holds a point until it
// is taken. The handshake and the run format are this implementation's
// choices.
module feature_scanner
  import hough_pkg::*;
(
  input  logic           clk,
  input  logic           rst_n,
  input  logic           frame_start,
  input  logic           run_valid,
  output logic           run_ready,
  input  run_t           run,
  output logic           pt_valid,
  input  logic           pt_ready,
  output logic [X_W-1:0] pt_x,
  output logic [Y_W-1:0] pt_y,
  output logic           zero_skip   // a zero run was skipped this cycle
);
  logic [X_W-1:0]   x;
  logic [Y_W-1:0]   y;
  logic [RUN_W-1:0] remain;   // feature points of the current run still to send
  logic             eol_hold;

  assign run_ready = (remain == '0) && !frame_start;
  assign pt_valid  = (remain != '0);
  assign pt_x      = x;
  assign pt_y      = y;
  assign zero_skip = run_valid && run_ready && !run.value;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      x        <= '0;
      y        <= '0;
      remain   <= '0;
      eol_hold <= 1'b0;
    end else if (frame_start) begin
      x        <= '0;
      y        <= '0;
      remain   <= '0;
      eol_hold <= 1'b0;
    end else if (remain != '0) begin
      if (pt_ready) begin
        remain <= remain - RUN_W'(1);
        if (remain == RUN_W'(1) && eol_hold) begin
          x <= '0;
          y <= y + Y_W'(1);
        end else begin
          x <= x + X_W'(1);
        end
      end
    end else if (run_valid) begin
      if (run.value) begin
        remain   <= run.len;
        eol_hold <= run.eol;
      end else if (run.eol) begin
        x <= '0;
        y <= y + Y_W'(1);
      end else begin
        x <= x + X_W'(run.len);
      end
    end
  end

  // Runs are never empty, and points stay inside the image.
  always_ff @(posedge clk) begin
    if (rst_n && run_valid && run_ready) begin
      a_run_len: assert (run.len != '0) else $error("empty run");
    end
    if (rst_n && pt_valid) begin
      a_in_image: assert (int'(x) < int'(IMG_W) && int'(y) < int'(IMG_H))
        else $error("feature point (%0d,%0d) outside the image", x, y);
    end
  end
endmodule
