// Self-checking test of abacus_mac: random operand pairs with random
// clears and idle gaps, plus the worst case X=Y=0xFF. Each operation must
// deliver out_valid exactly 16 clock edges after the accepting edge (the
// 17th cycle) with acc equal to the running unsigned sum modulo 2^16;
// in_valid while busy must change nothing.
module tb_abacus_mac;
  int checks = 0, failures = 0;
  logic        clk = 1'b0, rst_n = 1'b0;
  logic        clr = 1'b0, in_valid = 1'b0;
  logic [7:0]  x = '0, y = '0;
  logic        busy, out_valid;
  logic [15:0] acc;
  logic [15:0] model = '0;
  int          n_ignored = 0, n_clr = 0, n_wrap = 0;

  abacus_mac dut (.clk(clk), .rst_n(rst_n), .clr(clr), .in_valid(in_valid), .x(x), .y(y),
                  .busy(busy), .out_valid(out_valid), .acc(acc));

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic op(input logic [7:0] a, input logic [7:0] b, input logic c);
    int edges;
    logic [16:0] s;
    @(negedge clk);
    x = a; y = b; clr = c; in_valid = 1'b1;
    @(posedge clk);                 // accepting edge
    s = (c ? 17'd0 : 17'(model)) + 17'(a * b);
    if (!c && s[16]) n_wrap++;
    if (c) n_clr++;
    model = s[15:0];
    @(negedge clk);
    // keep in_valid high for a few cycles with other data: must be ignored
    if ($urandom_range(0, 3) == 0) begin
      x = ~a; y = 8'h5A; clr = 1'b1;
      n_ignored++;
    end else begin
      in_valid = 1'b0;
    end
    edges = 0;
    while (edges < 40) begin
      @(posedge clk);
      edges++;
      #1;
      in_valid = 1'b0; clr = 1'b0;
      if (out_valid) break;
    end
    checks += 2;
    if (edges != 16) begin
      failures++;
      if (failures < 10) $display("FAIL out_valid after %0d edges", edges);
    end
    if (acc !== model) begin
      failures++;
      if (failures < 10) $display("FAIL acc %h exp %h", acc, model);
    end
    repeat ($urandom_range(0, 2)) @(posedge clk);
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    op(8'hFF, 8'hFF, 1'b1);
    op(8'hFF, 8'hFF, 1'b0);
    for (int i = 0; i < 3000; i++)
      op(8'($urandom), 8'($urandom), $urandom_range(0, 29) == 0);
    $display("count: clears=%0d wraps=%0d ignored=%0d", n_clr, n_wrap, n_ignored);
    checks++;
    if (n_clr == 0 || n_wrap == 0 || n_ignored == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
