// neuron_chip: one neuron partition of the network (IC1..IC4).
//
// The chip sees a quarter of the image: 96 pixels, image rows 6*CHIP to
// 6*CHIP+5. For each of the 10 classes it holds NEURONS twelve-input RAM
// neurons (8 on IC1..IC3, 10 on IC4) and a class_counter that codes how many
// of them fired (3 bits on IC1..IC3, 4 bits on IC4).
//
// Each neuron input is wired to one pixel through ram_nn_pkg::neuron_pixel, a
// pseudo-random permutation per chip and class, and each neuron's trained
// minterms come from ram_nn_pkg::neuron_terms with N_TRAIN patterns per class.
// Both are this design's stand-ins for the random connection and the trained
// contents of the original network, which are data, not structure.
//
// Interface: pixels[q] is image pixel 96*CHIP+q; counts[c] is the count of
// class c. Purely combinational.
module neuron_chip
  import ram_nn_pkg::*;
#(
  parameter int unsigned CHIP    = 0,
  parameter int unsigned NEURONS = NEURONS_SMALL,
  parameter int unsigned COUNT_W = COUNT_W_SMALL,
  parameter int unsigned N_TRAIN = MAX_TRAIN
) (
  input  logic [CHIP_PIXELS-1:0]              pixels,
  output logic [N_CLASSES-1:0][COUNT_W-1:0]   counts
);

  for (genvar c = 0; c < N_CLASSES; c++) begin : g_class
    logic [NEURONS-1:0] fires;

    for (genvar j = 0; j < NEURONS; j++) begin : g_neuron
      localparam terms_t TERMS = neuron_terms(CHIP, c, j, N_TRAIN);
      addr_t addr;

      for (genvar i = 0; i < N_INPUTS; i++) begin : g_in
        localparam int unsigned PIX = neuron_pixel(CHIP, c, j, i) - CHIP * CHIP_PIXELS;
        assign addr[i] = pixels[PIX];
      end

      ram_neuron #(
        .N_INPUTS(N_INPUTS),
        .N_TERMS (MAX_TRAIN),
        .TERMS   (TERMS)
      ) u_neuron (
        .addr(addr),
        .fire(fires[j])
      );
    end

    class_counter #(
      .N      (NEURONS),
      .COUNT_W(COUNT_W)
    ) u_count (
      .fires(fires),
      .count(counts[c])
    );
  end

endmodule
