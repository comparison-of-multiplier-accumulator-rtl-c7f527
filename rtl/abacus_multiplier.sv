// ABACUS multiplier: unsigned 8x8 multiplication by moving "beads" (flags)
// in a cellular array, without half/full adders.
// On start the partial-product bits are loaded aligned: row r holds x&y[r]
// in columns r..r+7, giving a 16-column by 8-row flag array. Each clock
// cycle every column is processed at once:
//   compression  the flags of a column fall to the bottom rows, so a column
//                holding n flags becomes a thermometer code of n;
//   carry        from a column c with n >= 2 flags, 2^i flags with
//                i = floor(log2 n) are removed and a single flag is placed
//                in column c+i (value kept: 2^i * 2^c = 2^(c+i)).
// Both happen in the same cycle. When every column holds at most one flag
// the bottom row is the product. The number of useful cycles depends on the
// operands (at most 13 for 8-bit inputs; columns never exceed 8 flags), but
// done is raised at a fixed time, LATENCY-1 = 16 cycles after start, so
// that the MAC completes in 17 cycles as the design specifies.
// Interface: start (ignored while busy) loads x and y; busy stays high until
// done; done is a one-cycle pulse while p holds the product; settled shows
// that no column holds more than one flag. rst_n is asynchronous, active low.
// The alignment, the compression/carry rule and the 17-cycle latency follow
// the design; the choice of i as the largest power, the handshake and the
// exact cycle of done are this implementation's.
module abacus_multiplier #(
  parameter int unsigned LATENCY = 17
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        start,
  input  logic [7:0]  x,
  input  logic [7:0]  y,
  output logic        busy,
  output logic        done,
  output logic [15:0] p,
  output logic        settled
);
  localparam int unsigned COLS = 16;
  localparam int unsigned ROWS = 8;
  localparam int unsigned CW   = $clog2(LATENCY + 1);

  logic [ROWS-1:0] col_q [COLS];   // flag array, one word per column
  logic [ROWS-1:0] col_d [COLS];
  logic [CW-1:0]   cyc_q;

  // one compression + carry step on all columns
  always_comb begin
    logic [3:0] n     [COLS];
    logic [1:0] shift [COLS];
    logic [3:0] keep;
    logic [3:0] total;
    for (int c = 0; c < COLS; c++) begin
      n[c] = '0;
      for (int r = 0; r < ROWS; r++) n[c] = n[c] + 4'(col_q[c][r]);
      if (n[c] >= 4'd8)      shift[c] = 2'd3;
      else if (n[c] >= 4'd4) shift[c] = 2'd2;
      else if (n[c] >= 4'd2) shift[c] = 2'd1;
      else                   shift[c] = 2'd0;
    end
    for (int c = 0; c < COLS; c++) begin
      keep  = (shift[c] == 2'd0) ? n[c] : n[c] - (4'd1 << shift[c]);
      total = keep;
      for (int d = 1; d <= 3; d++)
        if (c >= d && shift[c-d] == 2'(d)) total = total + 4'd1;
      // thermometer code: flags at the bottom of the column
      for (int r = 0; r < ROWS; r++) col_d[c][r] = (4'(r) < total);
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int c = 0; c < COLS; c++) col_q[c] <= '0;
      busy  <= 1'b0;
      cyc_q <= '0;
    end else if (!busy) begin
      if (start) begin
        // alignment of the partial products: row r, column r+j
        for (int c = 0; c < COLS; c++)
          for (int r = 0; r < ROWS; r++)
            col_q[c][r] <= (c >= r && c - r < 8) ? (x[(c-r)%8] & y[r]) : 1'b0;
        busy  <= 1'b1;
        cyc_q <= CW'(1);
      end
    end else begin
      for (int c = 0; c < COLS; c++) col_q[c] <= col_d[c];
      if (done) begin
        busy  <= 1'b0;
        cyc_q <= '0;
      end else begin
        cyc_q <= cyc_q + CW'(1);
      end
    end
  end

  assign done = busy && (cyc_q == CW'(LATENCY - 1));

  // The fixed latency relies on every operand pair settling in time.
  a_settled_at_done: assert property (@(posedge clk) done |-> settled)
    else $error("ABACUS array not settled when done was raised");
  a_done_only_busy: assert property (@(posedge clk) done |-> busy);

  always_comb begin
    settled = 1'b1;
    for (int c = 0; c < COLS; c++) begin
      p[c] = col_q[c][0];
      if (col_q[c][ROWS-1:1] != '0) settled = 1'b0;
    end
  end
endmodule
