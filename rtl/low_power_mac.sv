// Low Power MAC: signed 8-bit multiply-accumulate, Z <= Z + X*Y, in three
// pipelined steps:
//   step 1: Baugh-Wooley partial products reduced by the carry-save tree to
//           a 15-bit sum row and carry row (plus the parity of bit 15),
//           registered;
//   step 2: a 15-bit Kogge-Stone adder adds the two rows; its carry out
//           completes bit 15 of the product, which is registered;
//   step 3: a 16-bit conditional sum adder accumulates the product.
// Interface as the other MACs: in_valid qualifies x/y, clr given with
// in_valid restarts the sum from this product, out_valid pulses three clock
// edges after the operands were accepted, acc wraps modulo 2^16, rst_n is
// asynchronous and active low. The three steps and the adders follow the
// design; the handshake, clear and reset are this implementation's.
module low_power_mac #(
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
  // step 1
  logic [14:0] srow, crow, srow_q, crow_q;
  logic        msb, msb_q;
  logic        v1_q, clr1_q;
  // step 2
  logic [14:0] ksa_sum;
  logic        ksa_cout;
  logic [15:0] prod_q;
  logic        v2_q, clr2_q;
  // step 3
  logic [ACC_W-1:0] acc_next;
  logic             unused_cout;

  bw_hpm_multiplier #(.N(8)) u_tree (
    .x(x), .y(y), .sum_row(srow), .carry_row(crow), .msb_part(msb)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      srow_q <= '0;
      crow_q <= '0;
      msb_q  <= 1'b0;
      v1_q   <= 1'b0;
      clr1_q <= 1'b0;
    end else begin
      v1_q <= in_valid;
      if (in_valid) begin
        srow_q <= srow;
        crow_q <= crow;
        msb_q  <= msb;
        clr1_q <= clr;
      end
    end
  end

  kogge_stone_adder #(.W(15)) u_ksa (
    .a(srow_q), .b(crow_q), .cin(1'b0), .sum(ksa_sum), .cout(ksa_cout)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      prod_q <= '0;
      v2_q   <= 1'b0;
      clr2_q <= 1'b0;
    end else begin
      v2_q <= v1_q;
      if (v1_q) begin
        prod_q <= {msb_q ^ ksa_cout, ksa_sum};
        clr2_q <= clr1_q;
      end
    end
  end

  cond_sum_adder #(.W(ACC_W)) u_acc_add (
    .a(clr2_q ? '0 : acc), .b(ACC_W'($signed(prod_q))), .cin(1'b0),
    .sum(acc_next), .cout(unused_cout)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      acc       <= '0;
      out_valid <= 1'b0;
    end else begin
      out_valid <= v2_q;
      if (v2_q) acc <= acc_next;
    end
  end
endmodule
