// tb_ram_nn_top: end-to-end test of the full network at its default size
// (340 neurons, 195 training patterns per class).
//
// The reference model trains one 4096-entry truth table per neuron at run
// time from the package's training patterns and connections, evaluates the
// network by table lookup, saturates the IC1..IC3 counts at 7, adds the four
// counts per class and picks the first class with the highest score. Images
// are streamed one per clock with in_valid; every result must appear exactly
// one cycle later. Stimuli: unseen noisy digits of every class, clean
// glyphs, an empty image and random images, with idle cycles and a reset in
// the middle of the stream.
//
// Each mechanism must occur at least once: a saturated 3-bit count, an IC4
// count above 7, a tie between classes, an idle cycle in the stream and a
// reset while results are pending. The recognition rate on unseen noisy
// digits is reported and must reach 90%.
module tb_ram_nn_top;
  import ram_nn_pkg::*;

  localparam int N_PER_CLASS = 30;   // unseen noisy test digits per class

  logic                clk = 1'b0;
  logic                rst_n;
  logic                in_valid;
  logic [N_PIXELS-1:0] pixels;
  logic                out_valid;
  logic [CLASS_W-1:0]  out_class;
  logic [SUM_W-1:0]    out_score;

  ram_nn_top dut (.clk(clk), .rst_n(rst_n), .in_valid(in_valid), .pixels(pixels),
                  .out_valid(out_valid), .out_class(out_class), .out_score(out_score));

  always #5 clk = ~clk;

  typedef struct {
    int cls;
    int score;
    int label;   // true digit, -1 if none
  } result_t;

  bit      tbl [N_CHIPS][N_CLASSES][NEURONS_LARGE][4096];
  result_t pending [$];
  int      checks = 0, failures = 0;
  int      n_saturate = 0, n_ic4_wide = 0, n_tie = 0, n_idle = 0, n_reset = 0;
  int      n_digits = 0, n_correct = 0, n_results = 0;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int n_neurons(int ch);
    return (ch == 3) ? NEURONS_LARGE : NEURONS_SMALL;
  endfunction

  // Reference classification of one image.
  function automatic result_t classify(logic [N_PIXELS-1:0] img, int label);
    result_t r;
    int sum [N_CLASSES];
    int n, a, nmax;
    r.label = label;
    for (int c = 0; c < N_CLASSES; c++) begin
      sum[c] = 0;
      for (int ch = 0; ch < N_CHIPS; ch++) begin
        n = 0;
        for (int j = 0; j < n_neurons(ch); j++) begin
          a = 0;
          for (int i = N_INPUTS - 1; i >= 0; i--) a = a * 2 + int'(img[neuron_pixel(ch, c, j, i)]);
          n += int'(tbl[ch][c][j][a]);
        end
        if (ch < 3 && n > 7) begin n = 7; n_saturate++; end
        if (ch == 3 && n > 7) n_ic4_wide++;
        sum[c] += n;
      end
    end
    r.cls = 0; r.score = sum[0];
    for (int c = 1; c < N_CLASSES; c++) if (sum[c] > r.score) begin r.cls = c; r.score = sum[c]; end
    nmax = 0;
    for (int c = 0; c < N_CLASSES; c++) if (sum[c] == r.score) nmax++;
    if (nmax > 1) n_tie++;
    return r;
  endfunction

  // Present one image in the next cycle.
  task automatic send(logic [N_PIXELS-1:0] img, int label);
    @(negedge clk);
    pixels   = img;
    in_valid = 1'b1;
    pending.push_back(classify(img, label));
  endtask

  task automatic idle();
    @(negedge clk);
    in_valid = 1'b0;
    pixels   = '0;
    n_idle++;
  endtask

  // Output monitor: out_valid must follow in_valid by exactly one cycle, and
  // an image presented during reset gives no result.
  always @(posedge clk) begin
    logic exp_valid;
    exp_valid = rst_n && in_valid;
    #1;
    checks++;
    if (out_valid !== exp_valid) begin
      failures++;
      $display("%0t out_valid=%b, expected %b", $time, out_valid, exp_valid);
    end
    if (out_valid && pending.size() > 0) begin
      result_t e;
      e = pending.pop_front();
      n_results++;
      checks++;
      if (int'(out_class) != e.cls || int'(out_score) != e.score) begin
        failures++;
        if (failures < 20) $display("%0t class=%0d score=%0d expected %0d/%0d", $time,
                                    out_class, out_score, e.cls, e.score);
      end
      if (e.label >= 0) begin
        n_digits++;
        if (int'(out_class) == e.label) n_correct++;
      end
    end
  end

  initial begin
    logic [N_PIXELS-1:0] img;
    int a;
    rst_n    = 1'b0;
    in_valid = 1'b0;
    pixels   = '0;
    // training of the reference tables
    foreach (tbl[ch, c, j, x]) tbl[ch][c][j][x] = 1'b0;
    for (int ch = 0; ch < N_CHIPS; ch++)
      for (int c = 0; c < N_CLASSES; c++)
        for (int j = 0; j < n_neurons(ch); j++)
          for (int k = 0; k < MAX_TRAIN; k++) begin
            a = 0;
            for (int i = N_INPUTS - 1; i >= 0; i--)
              a = a * 2 + int'(sample_pixel(c, k, neuron_pixel(ch, c, j, i)));
            tbl[ch][c][j][a] = 1'b1;
          end
    repeat (3) @(posedge clk);
    checks++;
    if (out_valid !== 1'b0) begin failures++; $display("out_valid set in reset"); end
    @(negedge clk);
    rst_n = 1'b1;

    // empty image and clean glyphs
    send('0, -1);
    for (int c = 0; c < N_CLASSES; c++) begin
      for (int p = 0; p < N_PIXELS; p++) img[p] = glyph_pixel(c, p);
      send(img, c);
    end
    idle();
    // unseen noisy digits, interleaved over classes, an idle cycle every 7 images
    for (int k = 0; k < N_PER_CLASS; k++)
      for (int c = 0; c < N_CLASSES; c++) begin
        for (int p = 0; p < N_PIXELS; p++) img[p] = sample_pixel(c, 5000 + k, p);
        send(img, c);
        if ((k * N_CLASSES + c) % 7 == 6) idle();
      end
    // random images
    for (int t = 0; t < 20; t++) begin
      for (int p = 0; p < N_PIXELS; p++) img[p] = 1'($urandom_range(0, 1));
      send(img, -1);
    end
    // reset while an image is presented: it must give no result
    @(negedge clk);
    for (int p = 0; p < N_PIXELS; p++) img[p] = glyph_pixel(8, p);
    pixels   = img;
    in_valid = 1'b1;
    rst_n    = 1'b0;
    n_reset++;
    @(posedge clk);
    #2;
    checks++;
    if (out_valid !== 1'b0) begin failures++; $display("out_valid not held low by reset"); end
    @(negedge clk);
    rst_n    = 1'b1;
    in_valid = 1'b0;
    for (int c = 0; c < N_CLASSES; c++) begin
      for (int p = 0; p < N_PIXELS; p++) img[p] = sample_pixel(c, 9000, p);
      send(img, c);
    end
    idle();
    idle();

    checks++;
    if (pending.size() != 0 || n_results != 1 + N_CLASSES + N_PER_CLASS * N_CLASSES + 20 + N_CLASSES) begin
      failures++;
      $display("results: %0d seen, %0d pending", n_results, pending.size());
    end
    $display("mechanisms: saturated 3-bit counts=%0d, IC4 counts above 7=%0d, ties=%0d, idle cycles=%0d, resets=%0d",
             n_saturate, n_ic4_wide, n_tie, n_idle, n_reset);
    checks += 5;
    if (n_saturate == 0) failures++;
    if (n_ic4_wide == 0) failures++;
    if (n_tie == 0)      failures++;
    if (n_idle == 0)     failures++;
    if (n_reset == 0)    failures++;
    $display("recognition: %0d of %0d digits (%0d%%)", n_correct, n_digits, 100 * n_correct / n_digits);
    checks++;
    if (100 * n_correct < 90 * n_digits) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
