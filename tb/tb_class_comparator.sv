// tb_class_comparator: random and tie-heavy score vectors; the expected
// winner is the first class (lowest index) holding the maximum score, found
// by a linear scan.
module tb_class_comparator;
  logic [9:0][5:0] sums;
  logic [3:0]      winner;
  logic [5:0]      best;
  int checks = 0, failures = 0, ties = 0;

  class_comparator dut (.sums(sums), .winner(winner), .best(best));

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int ew, eb, nmax;
    for (int t = 0; t < 4000; t++) begin
      for (int c = 0; c < 10; c++) begin
        // small ranges in half of the vectors make ties frequent
        if (t % 2 == 0) sums[c] = 6'($urandom_range(0, 3));
        else            sums[c] = 6'($urandom_range(0, 34));
      end
      if (t == 0) sums = '0;
      if (t == 1) for (int c = 0; c < 10; c++) sums[c] = 6'(c);
      if (t == 2) for (int c = 0; c < 10; c++) sums[c] = 6'(34 - c);
      #1;
      ew = 0; eb = int'(sums[0]); nmax = 0;
      for (int c = 1; c < 10; c++) if (int'(sums[c]) > eb) begin ew = c; eb = int'(sums[c]); end
      for (int c = 0; c < 10; c++) if (int'(sums[c]) == eb) nmax++;
      if (nmax > 1) ties++;
      checks++;
      if (int'(winner) != ew || int'(best) != eb) begin
        failures++;
        if (failures < 10) $display("sums=%p winner=%0d/%0d expected %0d/%0d", sums, winner, best, ew, eb);
      end
    end
    checks++;
    if (ties == 0) begin failures++; $display("no tie exercised"); end
    $display("ties exercised: %0d", ties);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
