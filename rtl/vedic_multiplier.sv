// Unsigned 8x8 Vedic multiplier (Vedic MAC datapath), built from four 4x4
// Vedic multipliers as the design prescribes. The crosswise products are
// added first, then aligned with the two vertical products:
// p = LL + (LH + HL) << 4 + HH << 8. Combinational.
module vedic_multiplier (
  input  logic [7:0]  x,
  input  logic [7:0]  y,
  output logic [15:0] p
);
  logic [7:0] ll, lh, hl, hh;
  logic [8:0] xsum;
  vedic_mult4 u_ll (.a(x[3:0]), .b(y[3:0]), .p(ll));
  vedic_mult4 u_lh (.a(x[3:0]), .b(y[7:4]), .p(lh));
  vedic_mult4 u_hl (.a(x[7:4]), .b(y[3:0]), .p(hl));
  vedic_mult4 u_hh (.a(x[7:4]), .b(y[7:4]), .p(hh));
  assign xsum = {1'b0, lh} + {1'b0, hl};
  assign p = {8'b0, ll} + {3'b0, xsum, 4'b0} + {hh, 8'b0};
endmodule
