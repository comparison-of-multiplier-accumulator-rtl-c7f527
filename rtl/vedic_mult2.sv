// 2x2 Vedic (Urdhva-Tiryagbhyam, "vertically and crosswise") multiplier:
// the vertical products a0b0 and a1b1 and the crosswise sum a1b0 + a0b1 are
// combined with two half adders. Building block of vedic_mult4.
// Combinational, unsigned.
module vedic_mult2 (
  input  logic [1:0] a,
  input  logic [1:0] b,
  output logic [3:0] p
);
  logic cross_c;
  assign p[0]    = a[0] & b[0];
  assign p[1]    = (a[1] & b[0]) ^ (a[0] & b[1]);
  assign cross_c = (a[1] & b[0]) & (a[0] & b[1]);
  assign p[2]    = (a[1] & b[1]) ^ cross_c;
  assign p[3]    = (a[1] & b[1]) & cross_c;
endmodule
