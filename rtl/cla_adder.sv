// Carry-lookahead adder. The Parallel Booth MAC uses 2-bit instances for
// its low byte and an 8-bit instance (the default) for the high byte.
// Every carry is written directly from the generate and propagate terms of
// all lower bits and the carry-in (one lookahead level, no ripple):
// c[i+1] = g[i] | p[i]g[i-1] | ... | p[i]...p[0]cin. Combinational.
module cla_adder #(
  parameter int unsigned W = 8
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic         cin,
  output logic [W-1:0] sum,
  output logic         cout
);
  logic [W-1:0] g, p;
  logic [W:0]   c;

  assign g = a & b;
  assign p = a ^ b;

  always_comb begin
    c[0] = cin;
    for (int i = 0; i < W; i++) begin
      logic term;
      logic acc;
      acc  = g[i];
      term = p[i];
      for (int j = i - 1; j >= 0; j--) begin
        acc  = acc | (term & g[j]);
        term = term & p[j];
      end
      c[i+1] = acc | (term & cin);
    end
  end

  assign sum  = p ^ c[W-1:0];
  assign cout = c[W];
endmodule
