// class_counter: output coding of one class on one neuron chip.
//
// Counts the neurons of one class that fired (population count of `fires`)
// and codes the count on COUNT_W bits for the decision chip. When the count
// does not fit it saturates at 2^COUNT_W - 1. This matters for the 8-neuron
// chips, whose count is 3 bits wide: all 8 neurons firing is reported as 7.
// The 3-bit and 4-bit widths follow the network's bus budget (130 bits into
// the decision chip); saturation is this design's reading of how 8 is coded.
//
// Interface: fires[i] is neuron i of the class; count is combinational.
module class_counter #(
  parameter int unsigned N       = 8,
  parameter int unsigned COUNT_W = 3
) (
  input  logic [N-1:0]       fires,
  output logic [COUNT_W-1:0] count
);

  localparam int unsigned FULL_W = $clog2(N + 1);
  localparam int unsigned MAXV   = (1 << COUNT_W) - 1;

  logic [FULL_W-1:0] total;

  always_comb begin
    total = '0;
    for (int unsigned i = 0; i < N; i++) total += FULL_W'(fires[i]);
  end

  always_comb begin
    if (32'(total) > MAXV) count = COUNT_W'(MAXV);
    else                   count = COUNT_W'(total);
  end

endmodule
