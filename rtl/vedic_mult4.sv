// 4x4 Vedic multiplier made of four 2x2 Vedic multipliers. The vertical
// products (low*low, high*high) and the two crosswise products (low*high,
// high*low) are aligned and summed: p = LL + (LH + HL) << 2 + HH << 4.
// Combinational, unsigned.
module vedic_mult4 (
  input  logic [3:0] a,
  input  logic [3:0] b,
  output logic [7:0] p
);
  logic [3:0] ll, lh, hl, hh;
  logic [4:0] xsum;
  vedic_mult2 u_ll (.a(a[1:0]), .b(b[1:0]), .p(ll));
  vedic_mult2 u_lh (.a(a[1:0]), .b(b[3:2]), .p(lh));
  vedic_mult2 u_hl (.a(a[3:2]), .b(b[1:0]), .p(hl));
  vedic_mult2 u_hh (.a(a[3:2]), .b(b[3:2]), .p(hh));
  assign xsum = {1'b0, lh} + {1'b0, hl};
  assign p = {4'b0, ll} + {1'b0, xsum, 2'b0} + {hh, 4'b0};
endmodule
