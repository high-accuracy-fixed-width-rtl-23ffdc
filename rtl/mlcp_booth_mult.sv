// mlcp_booth_mult: L x L fixed-width radix-4 Booth multiplier with
// multilevel conditional-probability (MLCP) error compensation.
//
// The full product of two L-bit two's-complement numbers has 2L bits; a
// fixed-width multiplier returns only the upper L. Computing all partial
// product bits and rounding afterwards is exact but large; dropping the lower
// half of the partial-product array is small but biased. This multiplier
// keeps the partial-product bits of the upper L columns plus W extra columns
// (column information W), drops the L - W lowest columns, and replaces them
// by an estimate: mlcp_compensator looks at the nonzero-code flags z_i of the
// Booth digits whose rows reach into the dropped columns and adds the
// expected carry at column L - W. The result approximates
// round(A * B / 2^L), the post-truncated product; a larger W gives higher
// accuracy at the cost of more kept partial-product bits.
//
// Structure: L/2 booth_encoder digits (b_{-1} = 0), L/2 booth_pp_row rows
// shifted by 2i with their negation +1 at column 2i, every bit below column
// L - W masked off, the compensation added at column L - W, and bits
// [2L-1:L] of the sum taken as the product. Combinational. The Booth
// encoding follows the design; W's default and the exact form of the
// compensation are this implementation's choices (see mlcp_compensator).
module mlcp_booth_mult
  import booth_pkg::*;
#(
  parameter int unsigned L = 16,
  parameter int unsigned W = 2
) (
  input  logic [L-1:0] a,   // multiplicand, two's complement
  input  logic [L-1:0] b,   // multiplier, two's complement
  output logic [L-1:0] p    // fixed-width product, about round(a*b / 2^L)
);
  localparam int unsigned R   = L / 2;            // Booth digits / rows
  localparam int unsigned T   = L - W;            // first kept column
  localparam int unsigned NTR = (L - W + 1) / 2;  // rows reaching below column T
  localparam int unsigned CW  = 8;
  localparam int unsigned SW  = 2 * L + 2;        // accumulator width

  booth_digit_t digit [R];
  logic [L:0]   pp    [R];
  logic [R-1:0] neg;
  logic [NTR-1:0] z_low;
  logic [CW-1:0]  comp;

  for (genvar i = 0; i < int'(R); i++) begin : g_row
    logic [2:0] bits;
    if (i == 0) begin : g_first
      assign bits = {b[1], b[0], 1'b0};
    end else begin : g_next
      assign bits = b[2*i+1 : 2*i-1];
    end
    booth_encoder u_enc (.bits(bits), .digit(digit[i]));
    booth_pp_row #(.L(L)) u_pp (.a(a), .digit(digit[i]), .pp(pp[i]), .neg(neg[i]));
  end

  for (genvar i = 0; i < int'(NTR); i++) begin : g_z
    assign z_low[i] = digit[i].z;
  end

  mlcp_compensator #(.L(L), .W(W), .NTR(NTR), .CW(CW)) u_comp (.z(z_low), .comp(comp));

  // Kept part of the partial-product array plus the compensation.
  logic [SW-1:0] keep_mask, acc;
  always_comb begin
    keep_mask = ~((SW'(1) << T) - SW'(1));
    acc = SW'(comp) << T;
    for (int i = 0; i < int'(R); i++) begin
      acc = acc + ((SW'($signed(pp[i])) << (2 * i)) & keep_mask);
      if (2 * i >= int'(T)) acc = acc + (SW'(neg[i]) << (2 * i));
    end
    p = acc[2*L-1:L];
  end
endmodule
