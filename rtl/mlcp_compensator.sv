// mlcp_compensator: truncation-error compensation of the fixed-width Booth
// multiplier, estimated from the nonzero codes of the Booth digits.
//
// A fixed-width L x L multiplier keeps the L most significant product
// columns plus W further "column information" columns of the lower half, and
// drops the L - W least significant columns (the truncated part, TP) of the
// partial-product array. Only the NTR = ceil((L-W)/2) lowest Booth rows reach
// into TP. The expected value of TP, given how many of those rows have a
// nonzero Booth code (z_i = 1), is worked out at elaboration time and stored
// as a small constant table of NTR + 1 entries; in hardware the circuit is a
// population count of the z_i and that table.
//
// How the table is derived: with the multiplicand uniformly distributed,
// every TP bit of a row with digit y has a known mean (1/2 for a selected or
// inverted multiplicand bit, 0 or 1 for the bit shifted in by 2A, plus the
// negation +1), so E[TP | y_0..y_{NTR-1}] is a sum of per-row terms g_i(y_i).
// The Booth digits are not independent (neighbouring digits share a
// multiplier bit), so the distribution of all digits jointly with their
// nonzero count is obtained by a forward recursion over the digits with the
// shared bit as state. The table entry for count k is
//     C_k = round((E[TP | k] + 2^(L-1)) / 2^(L-W)),
// the estimate of the carry that TP and the final rounding constant send into
// column L-W, so that the product approximates round(A*B / 2^L).
// The closed form the method is known for is not reproduced here; this exact
// conditional expectation plays its role. Combinational.
module mlcp_compensator #(
  parameter int unsigned L  = 16,
  parameter int unsigned W  = 2,
  parameter int unsigned NTR = (L - W + 1) / 2,  // rows reaching the truncated part
  parameter int unsigned CW = 8                  // bits of the compensation value
) (
  input  logic [NTR-1:0] z,      // nonzero flags of the NTR lowest Booth digits
  output logic [CW-1:0]  comp    // added at column L-W
);
  localparam int unsigned KW = $clog2(NTR + 1);

  // Compensation value for `k` nonzero codes among the low NTR digits.
  function automatic longint unsigned comp_value(int unsigned l, int unsigned w, int unsigned k);
    // cnt[2j+s]: number of multiplier bit patterns of the digits seen so far
    //            with j nonzero digits and shared bit s;
    // sum[2j+s]: sum over those patterns of 2 * E[TP of those rows | digits].
    longint unsigned cnt [66];
    longint unsigned sum [66];
    longint unsigned ncnt[66];
    longint unsigned nsum[66];
    longint unsigned tot_c, tot_s, g2;
    int unsigned     ntr, m, nz;
    int              y;
    ntr = (l - w + 1) / 2;
    for (int j = 0; j < 66; j++) begin
      cnt[j] = 0;
      sum[j] = 0;
    end
    cnt[0] = 1;  // b_{-1} = 0
    for (int unsigned i = 0; i < ntr; i++) begin
      m = l - w - 2 * i;  // bits of row i inside TP
      for (int j = 0; j < 66; j++) begin
        ncnt[j] = 0;
        nsum[j] = 0;
      end
      for (int j = 0; j <= int'(i); j++)
        for (int s = 0; s < 2; s++)
          for (int b0 = 0; b0 < 2; b0++)
            for (int b1 = 0; b1 < 2; b1++) begin
              y = -2 * b1 + b0 + s;
              case (y)
                 1: g2 = ((longint'(1) << m) - 1) << (2 * i);
                -1: g2 = ((longint'(1) << m) + 1) << (2 * i);
                 2: g2 = ((longint'(1) << m) - 2) << (2 * i);
                -2: g2 = ((longint'(1) << m) + 2) << (2 * i);
                default: g2 = 0;
              endcase
              nz = (y != 0) ? 1 : 0;
              ncnt[2 * (j + nz) + b1] += cnt[2 * j + s];
              nsum[2 * (j + nz) + b1] += sum[2 * j + s] + cnt[2 * j + s] * g2;
            end
      for (int j = 0; j < 66; j++) begin
        cnt[j] = ncnt[j];
        sum[j] = nsum[j];
      end
    end
    tot_c = cnt[2 * k] + cnt[2 * k + 1];
    tot_s = sum[2 * k] + sum[2 * k + 1];
    if (tot_c == 0) return 0;
    return (tot_s + tot_c * (longint'(1) << l)) / (tot_c * (longint'(1) << (l - w + 1)));
  endfunction

  logic [CW-1:0] table_q [NTR+1];
  for (genvar k = 0; k <= NTR; k++) begin : g_table
    localparam longint unsigned CK = comp_value(L, W, k);
    assign table_q[k] = CW'(CK);
    initial begin
      assert (CK < (longint'(1) << CW)) else $error("compensation %0d needs more than CW bits", CK);
    end
  end

  logic [KW-1:0] nz_count;
  always_comb begin
    nz_count = '0;
    for (int i = 0; i < int'(NTR); i++) nz_count = nz_count + KW'(z[i]);
    comp = table_q[nz_count];
  end

  initial begin
    assert (L >= 4 && L % 2 == 0 && W < L && L <= 30) else $error("unsupported L/W");
  end
endmodule
