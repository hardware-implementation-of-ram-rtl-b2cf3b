// tb_train_sizes: the network trained with fewer patterns per class.
//
// Two copies of ram_nn_top are elaborated with N_TRAIN = 50 and 100, two of
// the training-set sizes of the original study (the default, 195, is covered
// by tb_ram_nn_top). Both classify the same 200 unseen noisy digits, one per
// clock. Every result is compared with a table-lookup reference model
// trained on the same number of patterns, and the recognition rate of each
// size is printed.
module tb_train_sizes;
  import ram_nn_pkg::*;

  localparam int N_SIZES     = 2;
  localparam int SIZES [N_SIZES] = '{50, 100};
  localparam int N_PER_CLASS = 20;

  logic                clk = 1'b0;
  logic                rst_n;
  logic                in_valid;
  logic [N_PIXELS-1:0] pixels;
  logic                out_valid [N_SIZES];
  logic [CLASS_W-1:0]  out_class [N_SIZES];
  logic [SUM_W-1:0]    out_score [N_SIZES];

  ram_nn_top #(.N_TRAIN(SIZES[0])) dut_a (.clk(clk), .rst_n(rst_n), .in_valid(in_valid),
    .pixels(pixels), .out_valid(out_valid[0]), .out_class(out_class[0]), .out_score(out_score[0]));
  ram_nn_top #(.N_TRAIN(SIZES[1])) dut_b (.clk(clk), .rst_n(rst_n), .in_valid(in_valid),
    .pixels(pixels), .out_valid(out_valid[1]), .out_class(out_class[1]), .out_score(out_score[1]));

  always #5 clk = ~clk;

  bit tbl [N_SIZES][N_CHIPS][N_CLASSES][NEURONS_LARGE][4096];
  int checks = 0, failures = 0;
  int correct [N_SIZES];

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int n_neurons(int ch);
    return (ch == 3) ? NEURONS_LARGE : NEURONS_SMALL;
  endfunction

  function automatic void reference(int sz, logic [N_PIXELS-1:0] img, output int cls, output int score);
    int n, a, sum;
    cls = 0; score = -1;
    for (int c = 0; c < N_CLASSES; c++) begin
      sum = 0;
      for (int ch = 0; ch < N_CHIPS; ch++) begin
        n = 0;
        for (int j = 0; j < n_neurons(ch); j++) begin
          a = 0;
          for (int i = N_INPUTS - 1; i >= 0; i--) a = a * 2 + int'(img[neuron_pixel(ch, c, j, i)]);
          n += int'(tbl[sz][ch][c][j][a]);
        end
        sum += (ch < 3 && n > 7) ? 7 : n;
      end
      if (sum > score) begin cls = c; score = sum; end
    end
  endfunction

  initial begin
    logic [N_PIXELS-1:0] img;
    int a, ec, es;
    rst_n = 1'b0; in_valid = 1'b0; pixels = '0;
    foreach (tbl[s, ch, c, j, x]) tbl[s][ch][c][j][x] = 1'b0;
    foreach (correct[s]) correct[s] = 0;
    for (int s = 0; s < N_SIZES; s++)
      for (int ch = 0; ch < N_CHIPS; ch++)
        for (int c = 0; c < N_CLASSES; c++)
          for (int j = 0; j < n_neurons(ch); j++)
            for (int k = 0; k < SIZES[s]; k++) begin
              a = 0;
              for (int i = N_INPUTS - 1; i >= 0; i--)
                a = a * 2 + int'(sample_pixel(c, k, neuron_pixel(ch, c, j, i)));
              tbl[s][ch][c][j][a] = 1'b1;
            end
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int k = 0; k < N_PER_CLASS; k++)
      for (int c = 0; c < N_CLASSES; c++) begin
        @(negedge clk);
        for (int p = 0; p < N_PIXELS; p++) img[p] = sample_pixel(c, 7000 + k, p);
        pixels = img;
        in_valid = 1'b1;
        @(posedge clk);
        #1;
        for (int s = 0; s < N_SIZES; s++) begin
          reference(s, img, ec, es);
          checks++;
          if (!out_valid[s] || int'(out_class[s]) != ec || int'(out_score[s]) != es) begin
            failures++;
            if (failures < 10) $display("N_TRAIN=%0d class=%0d/%0d expected %0d/%0d", SIZES[s],
                                        out_class[s], out_score[s], ec, es);
          end
          if (int'(out_class[s]) == c) correct[s]++;
        end
      end
    for (int s = 0; s < N_SIZES; s++)
      $display("N_TRAIN=%0d: recognised %0d of %0d unseen digits", SIZES[s], correct[s], N_PER_CLASS * N_CLASSES);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
