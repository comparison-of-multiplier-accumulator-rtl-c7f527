// Six 8-bit multiplier-accumulator architectures side by side, each with
// its own operands, clear, valid and result, sharing clock and reset:
//   booth    signed,   radix-2 Booth + CSA, conditional-sum accumulator, 2 stages
//   wallace  unsigned, Wallace tree,         conditional-sum accumulator, 2 stages
//   pbooth   signed,   radix-4 Booth with accumulation merged into the CSA, 3 stages
//   lowpwr   signed,   Baugh-Wooley + reduction tree + Kogge-Stone, 3 stages
//   vedic    unsigned, Vedic multiplier,     conditional-sum accumulator, 2 stages
//   abacus   unsigned, ABACUS bead array,    17 cycles per operation
// The architectures are alternatives and exchange no data. The six
// architectures are those of the design; gathering them in one top with
// separate ports is this implementation's choice.
module mac_compare_top (
  input  logic        clk,
  input  logic        rst_n,
  // Booth MAC
  input  logic        booth_clr,
  input  logic        booth_in_valid,
  input  logic [7:0]  booth_x,
  input  logic [7:0]  booth_y,
  output logic        booth_out_valid,
  output logic [15:0] booth_acc,
  // Wallace Tree MAC
  input  logic        wallace_clr,
  input  logic        wallace_in_valid,
  input  logic [7:0]  wallace_x,
  input  logic [7:0]  wallace_y,
  output logic        wallace_out_valid,
  output logic [15:0] wallace_acc,
  // Parallel Booth MAC
  input  logic        pbooth_clr,
  input  logic        pbooth_in_valid,
  input  logic [7:0]  pbooth_x,
  input  logic [7:0]  pbooth_y,
  output logic        pbooth_out_valid,
  output logic [15:0] pbooth_acc,
  // Low Power MAC
  input  logic        lowpwr_clr,
  input  logic        lowpwr_in_valid,
  input  logic [7:0]  lowpwr_x,
  input  logic [7:0]  lowpwr_y,
  output logic        lowpwr_out_valid,
  output logic [15:0] lowpwr_acc,
  // Vedic MAC
  input  logic        vedic_clr,
  input  logic        vedic_in_valid,
  input  logic [7:0]  vedic_x,
  input  logic [7:0]  vedic_y,
  output logic        vedic_out_valid,
  output logic [15:0] vedic_acc,
  // ABACUS MAC
  input  logic        abacus_clr,
  input  logic        abacus_in_valid,
  input  logic [7:0]  abacus_x,
  input  logic [7:0]  abacus_y,
  output logic        abacus_busy,
  output logic        abacus_out_valid,
  output logic [15:0] abacus_acc
);
  booth_mac u_booth (
    .clk, .rst_n, .clr(booth_clr), .in_valid(booth_in_valid), .x(booth_x), .y(booth_y),
    .out_valid(booth_out_valid), .acc(booth_acc)
  );
  wallace_mac u_wallace (
    .clk, .rst_n, .clr(wallace_clr), .in_valid(wallace_in_valid), .x(wallace_x), .y(wallace_y),
    .out_valid(wallace_out_valid), .acc(wallace_acc)
  );
  parallel_booth_mac u_pbooth (
    .clk, .rst_n, .clr(pbooth_clr), .in_valid(pbooth_in_valid), .x(pbooth_x), .y(pbooth_y),
    .out_valid(pbooth_out_valid), .acc(pbooth_acc)
  );
  low_power_mac u_lowpwr (
    .clk, .rst_n, .clr(lowpwr_clr), .in_valid(lowpwr_in_valid), .x(lowpwr_x), .y(lowpwr_y),
    .out_valid(lowpwr_out_valid), .acc(lowpwr_acc)
  );
  vedic_mac u_vedic (
    .clk, .rst_n, .clr(vedic_clr), .in_valid(vedic_in_valid), .x(vedic_x), .y(vedic_y),
    .out_valid(vedic_out_valid), .acc(vedic_acc)
  );
  abacus_mac u_abacus (
    .clk, .rst_n, .clr(abacus_clr), .in_valid(abacus_in_valid), .x(abacus_x), .y(abacus_y),
    .busy(abacus_busy), .out_valid(abacus_out_valid), .acc(abacus_acc)
  );
endmodule
