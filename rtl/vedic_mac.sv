// Vedic MAC: unsigned 8-bit multiply-accumulate, Z <= Z + X*Y, with a Vedic (vertical and crosswise) multiplier and a conditional-sum accumulator.
// Two pipeline stages, one operand pair accepted per cycle:
//   stage 1: the vedic_multiplier forms the 16-bit product of x and y, which is
//            registered together with the valid and clear flags;
//   stage 2: a 16-bit conditional sum adder adds the registered product to
//            the accumulator Z (or loads it when clear was set).
// Interface: in_valid qualifies x/y; clr given with in_valid restarts the
// sum from this product. out_valid pulses when acc holds a new value,
// two clock edges after the operands were accepted. The accumulator wraps
// modulo 2^16. rst_n is asynchronous and active low. The handshake, clear
// and reset are this implementation's; the stage split follows the design.
module vedic_mac #(
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
  logic [15:0]      prod, prod_q;
  logic             v_q, clr_q;
  logic [ACC_W-1:0] addend, acc_next;
  logic             unused_cout;

  vedic_multiplier u_mult (.x(x), .y(y), .p(prod));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      prod_q <= '0;
      v_q    <= 1'b0;
      clr_q  <= 1'b0;
    end else begin
      v_q <= in_valid;
      if (in_valid) begin
        prod_q <= prod;
        clr_q  <= clr;
      end
    end
  end

  assign addend = ACC_W'(prod_q);

  cond_sum_adder #(.W(ACC_W)) u_acc_add (
    .a(clr_q ? '0 : acc), .b(addend), .cin(1'b0), .sum(acc_next), .cout(unused_cout)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      acc       <= '0;
      out_valid <= 1'b0;
    end else begin
      out_valid <= v_q;
      if (v_q) acc <= acc_next;
    end
  end
endmodule
