// Conditional sum adder (Sklansky), the accumulator adder of the Booth,
// Wallace, Low Power, Vedic and ABACUS MACs.
// Every bit first computes its sum and carry for both possible carry-ins.
// Over $clog2(W) levels, neighbouring blocks are merged: the carry out of
// the lower block (for each assumed carry-in) selects which pair of
// precomputed results the upper block keeps. The real carry-in then selects
// the final sum at the end. Purely combinational, depth O(log W) muxes.
// The width is 16 bits as in the accumulator comparison of the design; the
// merge structure is the textbook one.
module cond_sum_adder #(
  parameter int unsigned W = 16
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic         cin,
  output logic [W-1:0] sum,
  output logic         cout
);
  localparam int unsigned LV = (W > 1) ? $clog2(W) : 1;

  // s[k][i] / c[k][i]: sum bit i and carry out of the current block that
  // holds bit i, assuming carry-in k into that block.
  always_comb begin
    logic [W-1:0] s [2];
    logic [W-1:0] c [2];
    logic [W-1:0] ns [2];
    logic [W-1:0] nc [2];
    for (int k = 0; k < 2; k++) begin
      s[k] = k[0] ? ~(a ^ b) : (a ^ b);
      c[k] = k[0] ? (a | b)  : (a & b);
    end
    for (int l = 0; l < LV; l++) begin
      int bs, hb, base, ltop, top;
      bs = 2 ** (l + 1);
      hb = 2 ** l;
      for (int i = 0; i < W; i++) begin
        base = (i / bs) * bs;
        ltop = base + hb - 1;
        top  = (base + bs - 1 < W) ? base + bs - 1 : W - 1;
        for (int k = 0; k < 2; k++) begin
          if (i - base >= hb) begin
            // upper half: the lower half's carry out picks the result
            ns[k][i] = c[k][ltop] ? s[1][i] : s[0][i];
            nc[k][i] = c[k][ltop] ? c[1][i] : c[0][i];
          end else if (top > ltop) begin
            // lower half keeps its sum; block carry comes from the upper half
            ns[k][i] = s[k][i];
            nc[k][i] = c[k][ltop] ? c[1][top] : c[0][top];
          end else begin
            // no upper half inside the word
            ns[k][i] = s[k][i];
            nc[k][i] = c[k][i];
          end
        end
      end
      s = ns;
      c = nc;
    end
    sum  = cin ? s[1] : s[0];
    cout = cin ? c[1][W-1] : c[0][W-1];
  end
endmodule
