// Kogge-Stone parallel-prefix adder: the final adder of the Low Power MAC
// (15 bits there) and the second accumulator adder studied in the design
// (16 bits, the default here).
// Bitwise generate/propagate pairs are combined with the prefix operator
// (g,p)o(g',p') = (g | p&g', p&p') at distances 1,2,4,...; after $clog2(W)
// levels every bit knows the carry into it. The carry-in is folded in as a
// generate of a virtual bit -1. Purely combinational.
module kogge_stone_adder #(
  parameter int unsigned W = 16
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic         cin,
  output logic [W-1:0] sum,
  output logic         cout
);
  localparam int unsigned LV = (W > 1) ? $clog2(W + 1) : 1;

  // index 0 is the carry-in, index i+1 is bit i
  logic [W:0] g [LV+1];
  logic [W:0] p [LV+1];

  assign g[0] = {a & b, cin};
  assign p[0] = {a ^ b, 1'b0};

  for (genvar l = 0; l < LV; l++) begin : g_lvl
    localparam int unsigned D = 2 ** l;
    for (genvar i = 0; i <= W; i++) begin : g_bit
      if (i >= D) begin : g_op
        assign g[l+1][i] = g[l][i] | (p[l][i] & g[l][i-D]);
        assign p[l+1][i] = p[l][i] & p[l][i-D];
      end else begin : g_pass
        assign g[l+1][i] = g[l][i];
        assign p[l+1][i] = p[l][i];
      end
    end
  end

  // g[LV][i] is the carry out of bit i-1, i.e. the carry into bit i
  assign sum  = p[0][W:1] ^ g[LV][W-1:0];
  assign cout = g[LV][W];
endmodule
