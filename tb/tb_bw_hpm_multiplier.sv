// Self-checking test of bw_hpm_multiplier: for all 65536 signed operand
// pairs the 15-bit sum and carry rows, added, with bit 15 completed by
// msb_part, must equal the two's-complement product x*y.
module tb_bw_hpm_multiplier;
  int checks = 0, failures = 0;
  logic [7:0]  x, y;
  logic [14:0] srow, crow;
  logic        msb;

  bw_hpm_multiplier dut (.x(x), .y(y), .sum_row(srow), .carry_row(crow), .msb_part(msb));

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
        logic [15:0] expected, got, rows;
        x = 8'(i); y = 8'(j);
        #1;
        expected = 16'($signed(x) * $signed(y));
        rows     = 16'(srow) + 16'(crow);
        got      = {rows[15] ^ msb, rows[14:0]};
        checks++;
        if (got !== expected) begin
          failures++;
          if (failures < 10) $display("FAIL %h*%h got %h exp %h", x, y, got, expected);
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
