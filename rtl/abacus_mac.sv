// ABACUS MAC: unsigned 8-bit multiply-accumulate, Z <= Z + X*Y, built from
// the iterative ABACUS multiplier and a 16-bit conditional sum adder.
// One operation takes 17 clock cycles: in_valid (while not busy) starts the
// multiplier; when it signals done, the product is added to the
// accumulator (or loaded, if clr came with in_valid) and out_valid pulses,
// 16 clock edges after the accepting edge, i.e. in the 17th cycle counted
// from the accepting one. in_valid while busy is ignored. acc wraps modulo
// 2^16; rst_n is asynchronous, active low. The multiplier, the adder and
// the 17-cycle operation follow the design; the handshake is this
// implementation's.
module abacus_mac #(
  parameter int unsigned ACC_W = 16
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             clr,
  input  logic             in_valid,
  input  logic [7:0]       x,
  input  logic [7:0]       y,
  output logic             busy,
  output logic             out_valid,
  output logic [ACC_W-1:0] acc
);
  logic        done, unused_settled;
  logic [15:0] prod;
  logic        clr_q;
  logic [ACC_W-1:0] acc_next;
  logic        unused_cout;

  abacus_multiplier #(.LATENCY(17)) u_mult (
    .clk(clk), .rst_n(rst_n), .start(in_valid), .x(x), .y(y),
    .busy(busy), .done(done), .p(prod), .settled(unused_settled)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                clr_q <= 1'b0;
    else if (in_valid && !busy) clr_q <= clr;
  end

  cond_sum_adder #(.W(ACC_W)) u_acc_add (
    .a(clr_q ? '0 : acc), .b(ACC_W'(prod)), .cin(1'b0), .sum(acc_next), .cout(unused_cout)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      acc       <= '0;
      out_valid <= 1'b0;
    end else begin
      out_valid <= done;
      if (done) acc <= acc_next;
    end
  end
endmodule
