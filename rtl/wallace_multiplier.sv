// Unsigned 8x8 Wallace-tree multiplier (Wallace Tree MAC datapath).
// The partial products are the AND of every bit pair, giving N rows. In
// each tree level the rows are taken in groups of three and every group is
// reduced to two rows by one row of full adders; rows left over pass to the
// next level. For N=8 this takes four levels (8 -> 6 -> 4 -> 3 -> 2). The
// last two rows are added by a conditional sum adder. Combinational.
// Unsigned AND-array partial products and the Wallace tree follow the
// design; the final adder choice is this implementation's.
module wallace_multiplier #(
  parameter int unsigned N = 8
) (
  input  logic [N-1:0]   x,
  input  logic [N-1:0]   y,
  output logic [2*N-1:0] p
);
  localparam int unsigned PW = 2 * N;

  logic [PW-1:0] sum_row, carry_row;

  always_comb begin
    logic [PW-1:0] rows [N];
    logic [PW-1:0] nxt  [N];
    int n, m;
    for (int i = 0; i < N; i++) rows[i] = (PW'(x) & {PW{y[i]}}) << i;
    n = N;
    while (n > 2) begin
      m = 0;
      for (int g = 0; g + 2 < n; g += 3) begin
        nxt[m]   = rows[g] ^ rows[g+1] ^ rows[g+2];
        nxt[m+1] = ((rows[g] & rows[g+1]) | (rows[g] & rows[g+2]) |
                    (rows[g+1] & rows[g+2])) << 1;
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
    carry_row = (n > 1) ? rows[1] : '0;
  end

  logic unused_cout;
  cond_sum_adder #(.W(PW)) u_cpa (
    .a(sum_row), .b(carry_row), .cin(1'b0), .sum(p), .cout(unused_cout)
  );
endmodule
