// End-to-end test of mac_compare_top at its default parameters. All six
// MACs run at the same time, each on its own random operand stream with
// random gaps and clears. The five pipelined MACs get a new pair on most
// cycles, the ABACUS MAC one pair per 17-cycle operation. Each MAC's
// results are matched in order against its own reference sum (signed
// products for Booth, Parallel Booth and Low Power; unsigned for Wallace,
// Vedic and ABACUS) and against its latency (2, 2, 3, 3, 2 and 17 clock edges counted from the accepting edge).
// Every mechanism is counted and must occur at least once: clears,
// back-to-back pairs, accumulator wrap-around, negative products, the
// Parallel Booth low-byte carry k, ABACUS inputs ignored while busy, and
// the ABACUS worst case X=Y=0xFF.
module tb_mac_compare_top;
  localparam int NM = 6;            // 0 booth 1 wallace 2 pbooth 3 lowpwr 4 vedic 5 abacus
  localparam int LAT [NM] = '{2, 2, 3, 3, 2, 17};
  localparam bit SGN [NM] = '{1'b1, 1'b0, 1'b1, 1'b1, 1'b0, 1'b0};
  localparam int OPS = 6000;

  int checks = 0, failures = 0;
  logic clk = 1'b0, rst_n = 1'b0;
  logic [NM-1:0] clr = '0, vin = '0, vout;
  logic [7:0]    x [NM], y [NM];
  logic [15:0]   acc [NM];
  logic          abacus_busy;
  int            cycle = 0;

  typedef struct { logic [15:0] acc; int cyc; } exp_t;
  exp_t        q [NM][$];
  logic [15:0] model [NM];
  int n_clr [NM], n_b2b [NM], n_wrap [NM], n_neg [NM], n_out [NM];
  int n_kcarry = 0, n_ignored = 0, n_ffff = 0;

  mac_compare_top dut (
    .clk(clk), .rst_n(rst_n),
    .booth_clr(clr[0]), .booth_in_valid(vin[0]), .booth_x(x[0]), .booth_y(y[0]),
    .booth_out_valid(vout[0]), .booth_acc(acc[0]),
    .wallace_clr(clr[1]), .wallace_in_valid(vin[1]), .wallace_x(x[1]), .wallace_y(y[1]),
    .wallace_out_valid(vout[1]), .wallace_acc(acc[1]),
    .pbooth_clr(clr[2]), .pbooth_in_valid(vin[2]), .pbooth_x(x[2]), .pbooth_y(y[2]),
    .pbooth_out_valid(vout[2]), .pbooth_acc(acc[2]),
    .lowpwr_clr(clr[3]), .lowpwr_in_valid(vin[3]), .lowpwr_x(x[3]), .lowpwr_y(y[3]),
    .lowpwr_out_valid(vout[3]), .lowpwr_acc(acc[3]),
    .vedic_clr(clr[4]), .vedic_in_valid(vin[4]), .vedic_x(x[4]), .vedic_y(y[4]),
    .vedic_out_valid(vout[4]), .vedic_acc(acc[4]),
    .abacus_clr(clr[5]), .abacus_in_valid(vin[5]), .abacus_x(x[5]), .abacus_y(y[5]),
    .abacus_busy(abacus_busy), .abacus_out_valid(vout[5]), .abacus_acc(acc[5])
  );

  always #5 clk = ~clk;

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [7:0] pick();
    case ($urandom_range(0, 7))
      0: return 8'h00;
      1: return 8'h7F;
      2: return 8'h80;
      3: return 8'hFF;
      default: return 8'($urandom);
    endcase
  endfunction

  // checkers and reference models
  always @(posedge clk) begin
    cycle <= cycle + 1;
    if (rst_n) begin
      if (vout[2] && dut.u_pbooth.k_q) n_kcarry++;
      for (int m = 0; m < NM; m++) begin
        if (vout[m]) begin
          exp_t e;
          checks += 2;
          n_out[m]++;
          if (q[m].size() == 0) begin
            failures++;
            $display("FAIL mac %0d unexpected out_valid", m);
          end else begin
            e = q[m].pop_front();
            if (acc[m] !== e.acc) begin
              failures++;
              if (failures < 20) $display("FAIL mac %0d acc %h exp %h", m, acc[m], e.acc);
            end
            if (cycle - e.cyc != LAT[m]) begin
              failures++;
              if (failures < 20) $display("FAIL mac %0d latency %0d", m, cycle - e.cyc);
            end
          end
        end
        // the ABACUS MAC accepts only while idle
        if (vin[m] && (m != 5 || !abacus_busy)) begin
          logic [15:0] prod;
          logic [16:0] s;
          prod = SGN[m] ? 16'($signed(x[m]) * $signed(y[m])) : 16'(x[m] * y[m]);
          if (SGN[m] && prod[15]) n_neg[m]++;
          if (m == 5 && x[m] == 8'hFF && y[m] == 8'hFF) n_ffff++;
          s = (clr[m] ? 17'd0 : 17'(model[m])) + 17'(prod);
          if (!clr[m] && s[16]) n_wrap[m]++;
          if (clr[m]) n_clr[m]++;
          model[m] = s[15:0];
          q[m].push_back('{model[m], cycle});
        end else if (vin[m]) begin
          n_ignored++;
        end
      end
    end
  end

  initial begin
    logic [NM-1:0] prev;
    int abacus_ops;
    for (int m = 0; m < NM; m++) begin
      x[m] = '0; y[m] = '0; model[m] = '0;
      n_clr[m] = 0; n_b2b[m] = 0; n_wrap[m] = 0; n_neg[m] = 0; n_out[m] = 0;
    end
    abacus_ops = 0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    vin = '1; clr = '1;
    x[5] = 8'hFF; y[5] = 8'hFF;
    for (int m = 0; m < 5; m++) begin x[m] = pick(); y[m] = pick(); end
    while (abacus_ops < OPS / 17 || cycle < OPS) begin
      @(negedge clk);
      prev = vin;
      for (int m = 0; m < 5; m++) begin
        vin[m] = ($urandom_range(0, 3) != 0);
        clr[m] = vin[m] && ($urandom_range(0, 39) == 0);
        x[m] = pick(); y[m] = pick();
        if (vin[m] && prev[m]) n_b2b[m]++;
      end
      // ABACUS: mostly waits for idle, sometimes pokes while busy
      if (!abacus_busy && !vout[5]) begin
        vin[5] = ($urandom_range(0, 2) != 0);
        if (vin[5]) abacus_ops++;
      end else begin
        vin[5] = ($urandom_range(0, 9) == 0);
      end
      clr[5] = vin[5] && ($urandom_range(0, 19) == 0);
      x[5] = ($urandom_range(0, 15) == 0) ? 8'hFF : pick();
      y[5] = ($urandom_range(0, 15) == 0) ? 8'hFF : pick();
    end
    @(negedge clk);
    vin = '0; clr = '0;
    repeat (20) @(posedge clk);
    for (int m = 0; m < NM; m++) begin
      checks += 2;
      if (q[m].size() != 0) begin
        failures++;
        $display("FAIL mac %0d: %0d results missing", m, q[m].size());
      end
      $display("count mac %0d: results=%0d clears=%0d back_to_back=%0d wraps=%0d negative=%0d",
               m, n_out[m], n_clr[m], n_b2b[m], n_wrap[m], n_neg[m]);
      if (n_out[m] == 0 || n_clr[m] == 0 || n_wrap[m] == 0) failures++;
      if (m < 5 && n_b2b[m] == 0) failures++;
      if (SGN[m] && n_neg[m] == 0) failures++;
    end
    $display("count: pbooth_low_carry=%0d abacus_ignored=%0d abacus_ffxff=%0d",
             n_kcarry, n_ignored, n_ffff);
    checks += 3;
    if (n_kcarry == 0) failures++;
    if (n_ignored == 0) failures++;
    if (n_ffff == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
