// Signed 8x8 multiplier with radix-2 Booth recoding (Booth MAC datapath).
// Each multiplier bit pair (y[i], y[i-1]) selects +X (01), -X (10) or 0 for
// partial product i, so N=8 partial products are produced. A negative one
// is formed as the one's complement of the sign-extended X plus a
// correction bit N_i at bit i; the correction bits form one extra row.
// The nine rows are reduced by a linear array of carry-save (3:2) rows to a
// sum and a carry row, which a conditional sum adder turns into the 16-bit
// two's-complement product. Combinational; products are modulo 2^16.
// The recoding and the carry-save reduction follow the design; the
// sign-extension style (full extension to 16 bits) and the final adder
// choice are this implementation's.
module booth_multiplier #(
  parameter int unsigned N = 8
) (
  input  logic [N-1:0]   x,
  input  logic [N-1:0]   y,
  output logic [2*N-1:0] p
);
  localparam int unsigned PW = 2 * N;

  logic [PW-1:0] pp [N];
  logic [PW-1:0] nrow;
  logic [PW-1:0] xs;
  logic [PW-1:0] sum_row, carry_row;

  assign xs = PW'($signed(x));

  always_comb begin
    nrow = '0;
    for (int i = 0; i < N; i++) begin
      logic prev;
      prev = (i == 0) ? 1'b0 : y[i-1];
      unique case ({y[i], prev})
        2'b01:   pp[i] = xs << i;             // +X
        2'b10: begin
          pp[i]   = (~xs) << i;               // -X = ~X + 1
          nrow[i] = 1'b1;
        end
        default: pp[i] = '0;
      endcase
    end
  end

  // Linear carry-save array: rows are folded in one at a time.
  always_comb begin
    logic [PW-1:0] s, c, d;
    s = pp[0];
    c = pp[1];
    for (int i = 2; i <= N; i++) begin
      d = (i == N) ? nrow : pp[i];
      {s, c} = {s ^ c ^ d, ((s & c) | (s & d) | (c & d)) << 1};
    end
    sum_row   = s;
    carry_row = c;
  end

  logic unused_cout;
  cond_sum_adder #(.W(PW)) u_cpa (
    .a(sum_row), .b(carry_row), .cin(1'b0), .sum(p), .cout(unused_cout)
  );
endmodule
