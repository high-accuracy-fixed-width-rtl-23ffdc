// addsub: N-bit two's-complement adder/subtractor.
//
// The select input chooses between a + b (sub = 0) and a - b (sub = 1).
// Subtraction inverts b and injects a one at the least significant carry
// input, so one ripple adder serves both operations; this is the A/S cell of
// the iterative Hough processor. Purely combinational; the result wraps
// modulo 2^N like the hardware cell.
module addsub #(
  parameter int unsigned N = 28
) (
  input  logic [N-1:0] a,
  input  logic [N-1:0] b,
  input  logic         sub,   // 1: a - b, 0: a + b
  output logic [N-1:0] s
);
  logic [N-1:0] b_eff;
  always_comb begin
    b_eff = b ^ {N{sub}};
    s     = a + b_eff + N'(sub);
  end
endmodule
