// tb_group_adder: exhaustive test of the class score adder over all
// 3+3+3+4-bit count combinations.
module tb_group_adder;
  logic [2:0] c0, c1, c2;
  logic [3:0] c3;
  logic [5:0] sum;
  int checks = 0, failures = 0;

  group_adder dut (.c0(c0), .c1(c1), .c2(c2), .c3(c3), .sum(sum));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 8192; i++) begin
      {c3, c2, c1, c0} = 13'(i);
      #1;
      checks++;
      if (int'(sum) != int'(c0) + int'(c1) + int'(c2) + int'(c3)) begin
        failures++;
        if (failures < 10) $display("%0d+%0d+%0d+%0d gave %0d", c0, c1, c2, c3, sum);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
