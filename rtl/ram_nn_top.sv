// ram_nn_top: recall-mode RAM neural network for 24 x 16 digit images.
//
// 340 twelve-input RAM neurons, 34 per class for 10 classes, spread over four
// neuron chips as in the original five-chip partition: IC1..IC3 take 96
// pixels each and hold 8 neurons per class, IC4 takes the last 96 pixels and
// holds 10 neurons per class. Their per-class counts (3+3+3+4 bits per class,
// 130 bits) go to the decision chip IC5, which adds them and outputs the
// class with the highest score.
//
// The network itself is combinational. This top adds one register stage: an
// image on `pixels` with in_valid high in cycle t gives out_valid, out_class
// and out_score after the clock edge that ends cycle t (one-cycle latency, one
// image per cycle). The output register and the active-low asynchronous reset
// are this design's choices.
//
// Pixel index is row*16 + column; IC1 gets rows 0-5, IC2 rows 6-11, IC3 rows
// 12-17, IC4 rows 18-23. N_TRAIN sets how many training patterns per class
// the elaboration-time training in ram_nn_pkg uses.
module ram_nn_top
  import ram_nn_pkg::*;
#(
  parameter int unsigned N_TRAIN = MAX_TRAIN
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 in_valid,
  input  logic [N_PIXELS-1:0]  pixels,
  output logic                 out_valid,
  output logic [CLASS_W-1:0]   out_class,
  output logic [SUM_W-1:0]     out_score
);

  logic [2:0][N_CLASSES-1:0][COUNT_W_SMALL-1:0] cnt_small;
  logic [N_CLASSES-1:0][COUNT_W_LARGE-1:0]      cnt_large;
  logic [N_CLASSES-1:0][SUM_W-1:0]              sums;
  logic [CLASS_W-1:0]                           winner;
  logic [SUM_W-1:0]                             best;

  for (genvar ch = 0; ch < 3; ch++) begin : g_ic
    neuron_chip #(
      .CHIP   (ch),
      .NEURONS(NEURONS_SMALL),
      .COUNT_W(COUNT_W_SMALL),
      .N_TRAIN(N_TRAIN)
    ) u_chip (
      .pixels(pixels[ch*CHIP_PIXELS +: CHIP_PIXELS]),
      .counts(cnt_small[ch])
    );
  end

  neuron_chip #(
    .CHIP   (3),
    .NEURONS(NEURONS_LARGE),
    .COUNT_W(COUNT_W_LARGE),
    .N_TRAIN(N_TRAIN)
  ) u_ic4 (
    .pixels(pixels[3*CHIP_PIXELS +: CHIP_PIXELS]),
    .counts(cnt_large)
  );

  decision_chip u_ic5 (
    .cnt_small(cnt_small),
    .cnt_large(cnt_large),
    .sums     (sums),
    .winner   (winner),
    .best     (best)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      out_class <= '0;
      out_score <= '0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) begin
        out_class <= winner;
        out_score <= best;
      end
    end
  end

endmodule
