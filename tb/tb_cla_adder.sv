// Self-checking test of cla_adder: exhaustive at the default 8-bit width
// and at the 2-bit width used for the low byte of the Parallel Booth MAC,
// compared with the integer sum a + b + cin.
module tb_cla_adder;
  int checks = 0, failures = 0;
  logic [7:0] a, b, s;
  logic [1:0] a2, b2, s2;
  logic       cin, co, co2;

  cla_adder dut (.a(a), .b(b), .cin(cin), .sum(s), .cout(co));
  cla_adder #(.W(2)) dut2 (.a(a2), .b(b2), .cin(cin), .sum(s2), .cout(co2));

  initial begin
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 256; i++)
      for (int j = 0; j < 256; j++)
        for (int k = 0; k < 2; k++) begin
          a = 8'(i); b = 8'(j); cin = k[0];
          a2 = 2'(i); b2 = 2'(j);
          #1;
          checks += 2;
          if ({co, s} !== 9'(i + j + k)) begin
            failures++;
            if (failures < 10) $display("FAIL W8 %0d+%0d+%0d got %0d", i, j, k, {co, s});
          end
          if ({co2, s2} !== 3'((i % 4) + (j % 4) + k)) begin
            failures++;
            if (failures < 10) $display("FAIL W2 %0d+%0d+%0d got %0d", i % 4, j % 4, k, {co2, s2});
          end
        end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
