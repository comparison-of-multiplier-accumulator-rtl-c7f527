// Self-checking test of cond_sum_adder at its default width (16) and at an
// odd width (15): corner operands plus random ones, compared with the
// integer sum a + b + cin.
module tb_cond_sum_adder;
  int checks = 0, failures = 0;
  logic [15:0] a, b, s;
  logic        cin, co;
  logic [14:0] a5, b5, s5;
  logic        co5;

  cond_sum_adder dut (.a(a), .b(b), .cin(cin), .sum(s), .cout(co));
  cond_sum_adder #(.W(15)) dut15 (.a(a5), .b(b5), .cin(cin), .sum(s5), .cout(co5));

  task automatic check();
    logic [16:0] ref16;
    logic [15:0] ref15;
    #1;
    ref16 = 17'(a) + 17'(b) + 17'(cin);
    ref15 = 16'(a5) + 16'(b5) + 16'(cin);
    checks += 2;
    if ({co, s} !== ref16) begin
      failures++;
      if (failures < 10) $display("FAIL W16 %h+%h+%b: got %h exp %h", a, b, cin, {co, s}, ref16);
    end
    if ({co5, s5} !== ref15) begin
      failures++;
      if (failures < 10) $display("FAIL W15 %h+%h+%b: got %h exp %h", a5, b5, cin, {co5, s5}, ref15);
    end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [15:0] corner [6] = '{16'h0000, 16'hFFFF, 16'h8000, 16'h7FFF, 16'h5555, 16'h0001};
    foreach (corner[i]) foreach (corner[j]) for (int k = 0; k < 2; k++) begin
      a = corner[i]; b = corner[j]; cin = k[0];
      a5 = a[14:0]; b5 = b[14:0];
      check();
    end
    repeat (20000) begin
      a = 16'($urandom); b = 16'($urandom); cin = 1'($urandom);
      a5 = 15'($urandom); b5 = 15'($urandom);
      check();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
