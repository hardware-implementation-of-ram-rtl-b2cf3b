// decision_chip: IC5 of the network, from neuron counts to recognised class.
//
// Receives the 130 count bits of the neuron chips (10 classes x 3 bits from
// each of IC1..IC3, 10 x 4 bits from IC4), adds the four counts of each class
// in a group_adder and lets class_comparator pick the class with the highest
// score; its index leaves on 4 bits. Combinational, as in the original
// design, where this stage took most of the recall time.
//
// Interface: cnt_small[chip][class] for IC1..IC3, cnt_large[class] for IC4.
module decision_chip
  import ram_nn_pkg::*;
(
  input  logic [2:0][N_CLASSES-1:0][COUNT_W_SMALL-1:0] cnt_small,
  input  logic [N_CLASSES-1:0][COUNT_W_LARGE-1:0]      cnt_large,
  output logic [N_CLASSES-1:0][SUM_W-1:0]              sums,
  output logic [CLASS_W-1:0]                           winner,
  output logic [SUM_W-1:0]                             best
);

  for (genvar c = 0; c < N_CLASSES; c++) begin : g_sum
    group_adder #(
      .W_SMALL(COUNT_W_SMALL),
      .W_LARGE(COUNT_W_LARGE),
      .SUM_W  (SUM_W)
    ) u_add (
      .c0 (cnt_small[0][c]),
      .c1 (cnt_small[1][c]),
      .c2 (cnt_small[2][c]),
      .c3 (cnt_large[c]),
      .sum(sums[c])
    );
  end

  class_comparator #(
    .N_CLASSES(N_CLASSES),
    .SUM_W    (SUM_W),
    .CLASS_W  (CLASS_W)
  ) u_cmp (
    .sums  (sums),
    .winner(winner),
    .best  (best)
  );

endmodule
