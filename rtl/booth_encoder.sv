// booth_encoder: modified (radix-4) Booth encoder for one digit.
//
// Maps the overlapping multiplier bits (b_{2i+1}, b_{2i}, b_{2i-1}) to the
// digit y_i = -2 b_{2i+1} + b_{2i} + b_{2i-1} and to the nonzero flag z_i:
//   000 -> 0 (z=0)   001 -> +1   010 -> +1   011 -> +2
//   100 -> -2        101 -> -1   110 -> -1   111 -> 0 (z=0)
// The digit is given as sign and magnitude select lines (neg, one, two). The
// two zero codes clear all of them, so a zero digit contributes no bits at
// all to the partial-product array; the truncation-error estimate relies on
// that. Combinational.
module booth_encoder
  import booth_pkg::*;
(
  input  logic [2:0]   bits,   // {b_{2i+1}, b_{2i}, b_{2i-1}}
  output booth_digit_t digit
);
  always_comb begin
    digit.one = bits[1] ^ bits[0];
    digit.two = (bits == 3'b011) || (bits == 3'b100);
    digit.z   = digit.one || digit.two;
    digit.neg = bits[2] && digit.z;
  end
endmodule
