// Signed 8x8 Baugh-Wooley partial-product generator and reduction tree
// (first step of the Low Power MAC).
// Modified Baugh-Wooley: row j holds x_i&y_j at bit i+j; the terms that
// involve exactly one sign bit (x7&y_j and x_i&y7) are inverted, x7&y7 is
// kept, and constant ones are added at bits 8 and 15. The constant at bit 8
// sits in the free bit 8 of row 0. The eight rows over bits 0..14 are
// reduced in a balanced carry-save tree (8 -> 6 -> 4 -> 3 -> 2 rows, four
// full-adder levels) to a 15-bit sum row and a 15-bit carry row. Bit 15
// only receives the constant one and the carries leaving bit 14; their
// parity is given as msb_part, so the product is
//   {msb_part ^ cout, sum} where {cout, sum} = sum_row + carry_row.
// carry_row[0] is always zero, as in any carry row of a carry-save tree.
// Combinational. The partial-product scheme and the 15-bit sum/carry
// outputs follow the design; the exact tree wiring is this
// implementation's (a balanced tree of the same depth class).
module bw_hpm_multiplier #(
  parameter int unsigned N = 8
) (
  input  logic [N-1:0]   x,
  input  logic [N-1:0]   y,
  output logic [2*N-2:0] sum_row,
  output logic [2*N-2:0] carry_row,
  output logic           msb_part
);
  localparam int unsigned TW = 2 * N - 1;  // tree width: bits 0..2N-2

  always_comb begin
    logic [TW-1:0] rows [N];
    logic [TW-1:0] nxt  [N];
    logic          par;
    int n, m;
    for (int j = 0; j < N; j++) begin
      rows[j] = '0;
      for (int i = 0; i < N; i++) begin
        if ((i == N - 1) ^ (j == N - 1)) rows[j][i+j] = ~(x[i] & y[j]);
        else                             rows[j][i+j] = x[i] & y[j];
      end
    end
    rows[0][N] = 1'b1;   // Baugh-Wooley constant at bit N
    par = 1'b1;          // Baugh-Wooley constant at bit 2N-1
    n = N;
    while (n > 2) begin
      m = 0;
      for (int g = 0; g + 2 < n; g += 3) begin
        logic [TW:0] cy;
        cy = {((rows[g] & rows[g+1]) | (rows[g] & rows[g+2]) |
               (rows[g+1] & rows[g+2])), 1'b0};
        nxt[m]   = rows[g] ^ rows[g+1] ^ rows[g+2];
        nxt[m+1] = cy[TW-1:0];
        par      = par ^ cy[TW];
        m += 2;
      end
      for (int r = (n / 3) * 3; r < n; r++) begin
        nxt[m] = rows[r];
        m += 1;
      end
      for (int r = 0; r < m; r++) rows[r] = nxt[r];
      n = m;
    end
    sum_row   = rows[0];
    carry_row = rows[1];
    msb_part  = par;
  end
endmodule
