// tb_decision_chip: random count vectors from the four neuron chips; the
// expected per-class sums and the winning class (lowest index on a tie) are
// computed here and compared with the decision chip's outputs.
module tb_decision_chip;
  import ram_nn_pkg::*;
  logic [2:0][N_CLASSES-1:0][COUNT_W_SMALL-1:0] cnt_small;
  logic [N_CLASSES-1:0][COUNT_W_LARGE-1:0]      cnt_large;
  logic [N_CLASSES-1:0][SUM_W-1:0]              sums;
  logic [CLASS_W-1:0]                           winner;
  logic [SUM_W-1:0]                             best;
  int checks = 0, failures = 0;

  decision_chip dut (.cnt_small(cnt_small), .cnt_large(cnt_large), .sums(sums),
                     .winner(winner), .best(best));

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int es [N_CLASSES];
    int ew, eb;
    for (int t = 0; t < 3000; t++) begin
      for (int c = 0; c < N_CLASSES; c++) begin
        for (int ch = 0; ch < 3; ch++) cnt_small[ch][c] = 3'($urandom_range(0, 7));
        cnt_large[c] = 4'($urandom_range(0, 10));
      end
      if (t == 0) begin cnt_small = '0; cnt_large = '0; end
      #1;
      ew = 0; eb = -1;
      for (int c = 0; c < N_CLASSES; c++) begin
        es[c] = int'(cnt_small[0][c]) + int'(cnt_small[1][c]) + int'(cnt_small[2][c]) + int'(cnt_large[c]);
        checks++;
        if (int'(sums[c]) != es[c]) failures++;
        if (es[c] > eb) begin eb = es[c]; ew = c; end
      end
      checks++;
      if (int'(winner) != ew || int'(best) != eb) begin
        failures++;
        if (failures < 10) $display("t=%0d winner=%0d/%0d expected %0d/%0d", t, winner, best, ew, eb);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
