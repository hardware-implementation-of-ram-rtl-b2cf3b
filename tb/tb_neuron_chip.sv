// tb_neuron_chip: checks two neuron partitions, IC1 (8 neurons per class,
// 3-bit counts) and IC4 (10 neurons per class, 4-bit counts).
//
// The reference model trains a full 4096-entry truth table per neuron at run
// time, from the same training patterns and connections the package defines,
// and evaluates neurons by table lookup, so it shares no logic with the
// minterm-matching hardware. Stimuli: unseen noisy patterns of every class,
// clean glyphs, an empty image and random images. The test also requires
// that a 3-bit count saturated at least once.
module tb_neuron_chip;
  import ram_nn_pkg::*;

  logic [CHIP_PIXELS-1:0]                   px0, px3;
  logic [N_CLASSES-1:0][COUNT_W_SMALL-1:0]  cnt0;
  logic [N_CLASSES-1:0][COUNT_W_LARGE-1:0]  cnt3;

  neuron_chip dut0 (.pixels(px0), .counts(cnt0));
  neuron_chip #(.CHIP(3), .NEURONS(NEURONS_LARGE), .COUNT_W(COUNT_W_LARGE)) dut3
    (.pixels(px3), .counts(cnt3));

  bit tbl0 [N_CLASSES][NEURONS_SMALL][4096];
  bit tbl3 [N_CLASSES][NEURONS_LARGE][4096];
  int checks = 0, failures = 0, saturations = 0;

  initial begin
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int ref_count(int ch, int c, int nn, logic [N_PIXELS-1:0] img);
    int n = 0;
    int a;
    for (int j = 0; j < nn; j++) begin
      a = 0;
      for (int i = N_INPUTS - 1; i >= 0; i--) a = a * 2 + int'(img[neuron_pixel(ch, c, j, i)]);
      if (ch == 0) n += int'(tbl0[c][j][a]);
      else         n += int'(tbl3[c][j][a]);
    end
    return n;
  endfunction

  task automatic check_image(logic [N_PIXELS-1:0] img);
    int n, e;
    px0 = img[0 +: CHIP_PIXELS];
    px3 = img[3*CHIP_PIXELS +: CHIP_PIXELS];
    #1;
    for (int c = 0; c < N_CLASSES; c++) begin
      n = ref_count(0, c, NEURONS_SMALL, img);
      e = (n > 7) ? 7 : n;
      if (n > 7) saturations++;
      checks++;
      if (int'(cnt0[c]) != e) begin
        failures++;
        if (failures < 10) $display("IC1 class %0d count %0d expected %0d", c, cnt0[c], e);
      end
      e = ref_count(3, c, NEURONS_LARGE, img);
      checks++;
      if (int'(cnt3[c]) != e) begin
        failures++;
        if (failures < 10) $display("IC4 class %0d count %0d expected %0d", c, cnt3[c], e);
      end
    end
  endtask

  initial begin
    logic [N_PIXELS-1:0] img;
    int a;
    foreach (tbl0[c, j, x]) tbl0[c][j][x] = 1'b0;
    foreach (tbl3[c, j, x]) tbl3[c][j][x] = 1'b0;
    // training: write 1 at each address a training pattern presents
    for (int c = 0; c < N_CLASSES; c++)
      for (int k = 0; k < MAX_TRAIN; k++) begin
        for (int j = 0; j < NEURONS_SMALL; j++) begin
          a = 0;
          for (int i = N_INPUTS - 1; i >= 0; i--) a = a * 2 + int'(sample_pixel(c, k, neuron_pixel(0, c, j, i)));
          tbl0[c][j][a] = 1'b1;
        end
        for (int j = 0; j < NEURONS_LARGE; j++) begin
          a = 0;
          for (int i = N_INPUTS - 1; i >= 0; i--) a = a * 2 + int'(sample_pixel(c, k, neuron_pixel(3, c, j, i)));
          tbl3[c][j][a] = 1'b1;
        end
      end
    // unseen noisy patterns and clean glyphs of every class
    for (int c = 0; c < N_CLASSES; c++) begin
      for (int k = 0; k < 20; k++) begin
        for (int p = 0; p < N_PIXELS; p++) img[p] = sample_pixel(c, 1000 + k, p);
        check_image(img);
      end
      for (int p = 0; p < N_PIXELS; p++) img[p] = glyph_pixel(c, p);
      check_image(img);
    end
    check_image('0);
    for (int t = 0; t < 20; t++) begin
      for (int p = 0; p < N_PIXELS; p++) img[p] = 1'($urandom_range(0, 1));
      check_image(img);
    end
    $display("3-bit count saturations: %0d", saturations);
    checks++;
    if (saturations == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
