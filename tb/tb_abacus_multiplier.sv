// Self-checking test of abacus_multiplier over all 65536 operand pairs.
// For each pair: start is pulsed, busy must rise, done must come exactly
// 16 clock edges after the start edge (17-cycle operation), the flag array
// must have settled (no column above one flag) and p must equal x*y.
// A start given while busy must be ignored. The largest number of cycles
// any pair needed to settle is reported; X=Y=0xFF is checked on its own.
module tb_abacus_multiplier;
  int checks = 0, failures = 0;
  logic        clk = 1'b0, rst_n = 1'b0, start = 1'b0;
  logic [7:0]  x = '0, y = '0;
  logic        busy, done, settled;
  logic [15:0] p;
  int          worst = 0, n_ignored = 0;

  abacus_multiplier dut (.clk(clk), .rst_n(rst_n), .start(start), .x(x), .y(y),
                         .busy(busy), .done(done), .p(p), .settled(settled));

  always #5 clk = ~clk;

  initial begin
    repeat (1300000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(input logic [7:0] a, input logic [7:0] b, input bit poke);
    int edges, settle_at;
    logic [15:0] expected;
    expected = 16'(a * b);
    @(negedge clk);
    x = a; y = b; start = 1'b1;
    @(posedge clk);               // start edge
    @(negedge clk);
    start = 1'b0;
    checks++;
    if (!busy) failures++;
    if (poke) begin                // a start while busy must be ignored
      x = ~a; y = ~b; start = 1'b1;
      n_ignored++;
    end
    edges = 0; settle_at = -1;
    while (!done && edges < 40) begin
      @(posedge clk);
      edges++;
      #1;
      start = 1'b0;
      if (settled && settle_at < 0) settle_at = edges;
    end
    checks += 3;
    if (edges != 15) begin         // done seen after edge 15 -> sampled at edge 16
      failures++;
      if (failures < 10) $display("FAIL done after %0d edges", edges);
    end
    if (!settled) begin
      failures++;
      if (failures < 10) $display("FAIL %h*%h not settled", a, b);
    end
    if (p !== expected) begin
      failures++;
      if (failures < 10) $display("FAIL %h*%h got %h exp %h", a, b, p, expected);
    end
    if (settle_at > worst) worst = settle_at;
    @(posedge clk);
    #1;
    checks++;
    if (busy) begin
      failures++;
      $display("FAIL busy after done");
    end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    run(8'hFF, 8'hFF, 1'b1);
    for (int i = 0; i < 256; i++)
      for (int j = 0; j < 256; j++)
        run(8'(i), 8'(j), (i + j) % 97 == 0);
    $display("count: worst settle edges=%0d ignored starts=%0d", worst, n_ignored);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
