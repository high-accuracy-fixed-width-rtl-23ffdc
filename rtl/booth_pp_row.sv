// booth_pp_row: one partial-product row of a radix-4 Booth multiplier.
//
// Selects 0, A or 2A according to the digit magnitude and inverts the result
// for a negative digit, giving an (L+1)-bit two's-complement row. The +1
// that completes the negation is returned separately as `neg` and is added
// at the row's least significant column by the array. The digit's nonzero
// flag z is not needed here (the select lines already encode a zero digit).
// Combinational.
module booth_pp_row
  import booth_pkg::*;
#(
  parameter int unsigned L = 16
) (
  input  logic [L-1:0]  a,      // multiplicand, two's complement
  input  booth_digit_t  digit,
  output logic [L:0]    pp,     // row bits, to be sign extended
  output logic          neg     // +1 at the row's LSB column
);
  logic [L:0] a_ext, mag;
  always_comb begin
    a_ext = {a[L-1], a};
    mag   = digit.two ? {a, 1'b0} : (digit.one ? a_ext : '0);
    pp    = mag ^ {(L+1){digit.neg}};
    neg   = digit.neg;
  end
endmodule
