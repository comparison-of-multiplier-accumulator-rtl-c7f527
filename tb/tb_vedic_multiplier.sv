// Self-checking test of vedic_multiplier: all 65536 operand pairs, each product
// compared with the unsigned integer product x*y (16 bits).
module tb_vedic_multiplier;
  int checks = 0, failures = 0;
  logic [7:0]  x, y;
  logic [15:0] p;

  vedic_multiplier dut (.x(x), .y(y), .p(p));

  initial begin
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 256; i++)
      for (int j = 0; j < 256; j++) begin
        logic [15:0] expected;
        x = 8'(i); y = 8'(j);
        #1;
        expected = 16'(i * j);
        checks++;
        if (p !== expected) begin
          failures++;
          if (failures < 10) $display("FAIL %h*%h got %h exp %h", x, y, p, expected);
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
