// group_adder: the class score of the decision chip (IC5).
//
// Adds the counts one class received from the four neuron chips: three
// W_SMALL-bit counts from IC1..IC3 and one W_LARGE-bit count from IC4. The
// result, the number of the class's neurons that recognised the image (with
// the 3-bit counts saturated at 7), is SUM_W bits wide. Combinational.
module group_adder #(
  parameter int unsigned W_SMALL = 3,
  parameter int unsigned W_LARGE = 4,
  parameter int unsigned SUM_W   = 6
) (
  input  logic [W_SMALL-1:0] c0,
  input  logic [W_SMALL-1:0] c1,
  input  logic [W_SMALL-1:0] c2,
  input  logic [W_LARGE-1:0] c3,
  output logic [SUM_W-1:0]   sum
);

  assign sum = SUM_W'(c0) + SUM_W'(c1) + SUM_W'(c2) + SUM_W'(c3);

endmodule
