// Parallel Booth MAC: signed 8-bit multiply-accumulate, Z <= Z + X*Y, with
// the accumulation merged into the partial-product carry-save adder.
// Three pipeline stages, one operand pair accepted per cycle:
//   stage 1  Booth recoding of Y in overlapping 3-bit groups gives four
//            digits in {-2..2}; each selects 0, X or 2X, inverted (one's
//            complement) for a negative digit, sign extended to 16 bits and
//            shifted by 2i. The one's-to-two's complement corrections N_i
//            (bit 2i) are collected in one byte. All is registered.
//   stage 2  The running sum is held as a resolved low byte Z_lo, an
//            unresolved high byte in carry-save form (S_hi, C_hi) and the
//            carry k out of the low byte. Four rows of full adders reduce
//            six rows: PP0..PP3, {S_hi, Z_lo} and {C_hi, N}; the corrections
//            ride in the empty low byte of the fed-back carry row. A further
//            3:2 row over the high byte only takes in k at bit 8. The low byte
//            of the result is resolved at once by a chain of four 2-bit
//            carry-lookahead adders, whose carry out becomes the next k.
//   stage 3  The high byte is resolved by an 8-bit CLA (S_hi + C_hi + k) and
//            the 16-bit result is registered.
// The feedback loop lies inside stage 2, so back-to-back operands are fine.
// Interface as the other MACs: clr with in_valid restarts the sum from this
// product; out_valid pulses three clock edges after acceptance; acc wraps
// modulo 2^16; rst_n is asynchronous, active low.
// Follows the design: four partial products, accumulation inside the CSA,
// four full-adder rows for six inputs, 2-bit CLAs for the low byte with the
// N corrections, an 8-bit CLA for the high byte, three pipelined stages.
// This implementation's choices: the corrections enter the carry-save rows
// through the empty low byte instead of a third CLA input, the short extra
// row for k, full sign extension, and the handshake.
module parallel_booth_mac
  import mac_pkg::product_t, mac_pkg::csa_out_t, mac_pkg::csa3;
#(
  parameter int unsigned ACC_W = 16
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             clr,
  input  logic             in_valid,
  input  logic [7:0]       x,
  input  logic [7:0]       y,
  output logic             out_valid,
  output logic [ACC_W-1:0] acc
);
  // ---------------- stage 1: recoding and partial products ----------------
  typedef struct packed {
    logic neg;
    logic one;
    logic two;
  } booth_digit_t;

  booth_digit_t  dig [4];
  product_t      pp  [4];
  logic [7:0]    nvec;
  product_t      pp_q [4];
  logic [7:0]    nvec_q;
  logic          v1_q, clr1_q;

  always_comb begin
    nvec = '0;
    for (int i = 0; i < 4; i++) begin
      logic b2, b1, b0;
      logic [8:0] mag;
      b2 = y[2*i+1];
      b1 = y[2*i];
      b0 = (i == 0) ? 1'b0 : y[2*i-1];
      dig[i].neg = b2 & ~(b1 & b0);
      dig[i].one = b1 ^ b0;
      dig[i].two = (b2 & ~b1 & ~b0) | (~b2 & b1 & b0);
      mag = dig[i].one ? {x[7], x} : (dig[i].two ? {x, 1'b0} : 9'd0);
      pp[i] = (dig[i].neg ? ~product_t'($signed(mag)) : product_t'($signed(mag))) << (2 * i);
      nvec[2*i] = dig[i].neg;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < 4; i++) pp_q[i] <= '0;
      nvec_q <= '0;
      v1_q   <= 1'b0;
      clr1_q <= 1'b0;
    end else begin
      v1_q <= in_valid;
      if (in_valid) begin
        for (int i = 0; i < 4; i++) pp_q[i] <= pp[i];
        nvec_q <= nvec;
        clr1_q <= clr;
      end
    end
  end

  // ---------------- stage 2: merged carry-save accumulation ----------------
  logic [7:0] s_hi_q, c_hi_q, z_lo_q;
  logic       k_q;
  product_t   fb_s, fb_c;
  logic       fb_k;
  csa_out_t   r1, r2, r3, r4, r5;
  logic [7:0] lo_sum;
  logic [4:0] lo_c;          // carries between the 2-bit CLA blocks

  assign fb_s = clr1_q ? '0 : {s_hi_q, z_lo_q};
  assign fb_c = {clr1_q ? 8'd0 : c_hi_q, nvec_q};
  assign fb_k = clr1_q ? 1'b0 : k_q;

  assign r1 = csa3(pp_q[0], pp_q[1], pp_q[2]);
  assign r2 = csa3(r1.s, r1.c, pp_q[3]);
  assign r3 = csa3(r2.s, r2.c, fb_s);
  assign r4 = csa3(r3.s, r3.c, fb_c);
  // k (weight 2^8) joins the high byte only
  assign r5 = csa3({r4.s[15:8], 8'd0}, {r4.c[15:8], 8'd0}, {7'd0, fb_k, 8'd0});

  assign lo_c[0] = 1'b0;
  for (genvar j = 0; j < 4; j++) begin : g_lo_cla
    cla_adder #(.W(2)) u_cla2 (
      .a(r4.s[2*j+1:2*j]), .b(r4.c[2*j+1:2*j]), .cin(lo_c[j]),
      .sum(lo_sum[2*j+1:2*j]), .cout(lo_c[j+1])
    );
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s_hi_q <= '0;
      c_hi_q <= '0;
      z_lo_q <= '0;
      k_q    <= 1'b0;
    end else if (v1_q) begin
      s_hi_q <= r5.s[15:8];
      c_hi_q <= r5.c[15:8];
      z_lo_q <= lo_sum;
      k_q    <= lo_c[4];
    end
  end

  // ---------------- stage 3: high-byte CLA on demand ----------------
  logic       v2_q;
  logic [7:0] hi_sum;
  logic       unused_cout;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) v2_q <= 1'b0;
    else        v2_q <= v1_q;
  end

  cla_adder #(.W(8)) u_cla8 (
    .a(s_hi_q), .b(c_hi_q), .cin(k_q), .sum(hi_sum), .cout(unused_cout)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      acc       <= '0;
      out_valid <= 1'b0;
    end else begin
      out_valid <= v2_q;
      if (v2_q) acc <= ACC_W'({hi_sum, z_lo_q});
    end
  end
endmodule
