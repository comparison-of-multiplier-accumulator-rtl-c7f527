// Self-checking test of booth_mac. A random stream of operand pairs is applied
// with random gaps (in_valid low) and random clears, including
// back-to-back pairs, the extreme operands 0x00/0x7F/0x80/0xFF and long
// runs that wrap the 16-bit accumulator. A reference model keeps the
// running sum of the two's-complement products modulo 2^16. Every out_valid pulse is
// matched with the oldest outstanding operand pair: the accumulator value
// and the latency (2 clock edges from acceptance) are both checked.
module tb_booth_mac;
  localparam int LAT = 2;
  int checks = 0, failures = 0;
  logic        clk = 1'b0, rst_n = 1'b0;
  logic        clr = 1'b0, in_valid = 1'b0;
  logic [7:0]  x = '0, y = '0;
  logic        out_valid;
  logic [15:0] acc;
  int          cycle = 0;
  int          n_clr = 0, n_b2b = 0, n_wrap = 0;

  typedef struct { logic [15:0] acc; int cyc; } exp_t;
  exp_t q[$];
  logic [15:0] model = '0;

  booth_mac dut (.clk(clk), .rst_n(rst_n), .clr(clr), .in_valid(in_valid),
          .x(x), .y(y), .out_valid(out_valid), .acc(acc));

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
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

  // checker and reference model, sampled at each rising edge
  always @(posedge clk) begin
    cycle <= cycle + 1;
    if (rst_n && out_valid) begin
      checks += 2;
      if (q.size() == 0) begin
        failures++;
        $display("FAIL unexpected out_valid at cycle %0d", cycle);
      end else begin
        exp_t e;
        e = q.pop_front();
        if (acc !== e.acc) begin
          failures++;
          if (failures < 10) $display("FAIL acc %h exp %h at cycle %0d", acc, e.acc, cycle);
        end
        if (cycle - e.cyc != LAT) begin
          failures++;
          if (failures < 10) $display("FAIL latency %0d exp %0d", cycle - e.cyc, LAT);
        end
      end
    end
    if (rst_n && in_valid) begin
      logic [15:0] xv16, yv16, prod;
      logic [16:0] sum;
      logic [7:0] xv, yv;
      xv = x; yv = y;
      prod = 16'($signed(xv) * $signed(yv));
      sum  = (clr ? 17'd0 : 17'(model)) + 17'(prod);
      if (!clr && sum[16]) n_wrap++;
      model = sum[15:0];
      q.push_back('{model, cycle});
    end
  end

  initial begin
    logic prev_valid;
    prev_valid = 1'b0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    // first pair starts a fresh sum
    @(negedge clk);
    in_valid = 1'b1; clr = 1'b1; x = 8'h80; y = 8'h80;
    for (int i = 0; i < 20000; i++) begin
      @(negedge clk);
      prev_valid = in_valid;
      in_valid = ($urandom_range(0, 3) != 0);
      clr      = in_valid && ($urandom_range(0, 39) == 0);
      x = pick(); y = pick();
      if (in_valid && clr) n_clr++;
      if (in_valid && prev_valid) n_b2b++;
    end
    @(negedge clk);
    in_valid = 1'b0; clr = 1'b0;
    repeat (LAT + 3) @(posedge clk);
    checks++;
    if (q.size() != 0) begin
      failures++;
      $display("FAIL %0d results never came out", q.size());
    end
    $display("events: clears=%0d back_to_back=%0d wraps=%0d", n_clr, n_b2b, n_wrap);
    checks++;
    if (n_clr == 0 || n_b2b == 0 || n_wrap == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
