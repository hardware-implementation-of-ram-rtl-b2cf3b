// tb_class_counter: exhaustive test of the per-class output coding, for the
// 8-neuron / 3-bit form (IC1..IC3, saturating at 7) and the 10-neuron / 4-bit
// form (IC4, never saturating).
module tb_class_counter;
  logic [7:0] f8;
  logic [2:0] c8;
  logic [9:0] f10;
  logic [3:0] c10;
  int checks = 0, failures = 0, saturated = 0;

  class_counter #(.N(8),  .COUNT_W(3)) dut8  (.fires(f8),  .count(c8));
  class_counter #(.N(10), .COUNT_W(4)) dut10 (.fires(f10), .count(c10));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int n, e;
    for (int i = 0; i < 256; i++) begin
      f8 = 8'(i);
      #1;
      n = 0;
      for (int b = 0; b < 8; b++) n += (i >> b) & 1;
      e = (n > 7) ? 7 : n;
      if (n > 7) saturated++;
      checks++;
      if (int'(c8) != e) begin failures++; $display("N=8 fires=%b count=%0d expected=%0d", f8, c8, e); end
    end
    for (int i = 0; i < 1024; i++) begin
      f10 = 10'(i);
      #1;
      n = 0;
      for (int b = 0; b < 10; b++) n += (i >> b) & 1;
      checks++;
      if (int'(c10) != n) begin failures++; $display("N=10 fires=%b count=%0d expected=%0d", f10, c10, n); end
    end
    checks++;
    if (saturated != 1) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
