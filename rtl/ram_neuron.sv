// ram_neuron: one RAM (weightless) neuron written as logic instead of memory.
//
// A RAM neuron is a 2^N_INPUTS x 1 truth table addressed by N_INPUTS binary
// pixels; training writes 1 at every address a training pattern of the
// neuron's class presents. Rather than storing the table, the neuron is the OR
// of the minterms whose entry is 1: fire = 1 when addr equals one of TERMS.
// Only the 1-entries cost logic, and synthesis minimises the sum of products
// for the constant TERMS, so the trained weights disappear into gates.
//
// Interface: addr[0] is input e1, addr[N_INPUTS-1] is e12. fire is purely
// combinational (no clock, no state).
//
// Defaults: 12 inputs and the 30 minterms of the published neuron of class
// "Four" (listed in order; duplicates are harmless). The last-but-one of them is
// completed with !e12 where its printed form breaks off. The bit order
// (e1 = LSB) is this design's choice.
module ram_neuron #(
  parameter int unsigned N_INPUTS = 12,
  parameter int unsigned N_TERMS  = 30,
  parameter logic [N_INPUTS-1:0] TERMS [N_TERMS] = '{
    12'h3FC, 12'h71E, 12'h087, 12'h39E, 12'h39E, 12'h384, 12'h39C, 12'h39C,
    12'h39C, 12'h384, 12'h384, 12'h384, 12'h39C, 12'h38E, 12'h38E, 12'h38E,
    12'h38E, 12'h38E, 12'h38E, 12'h38E, 12'h38E, 12'h38E, 12'h38C, 12'h384,
    12'h386, 12'h386, 12'h386, 12'h386, 12'h386, 12'h39C}
) (
  input  logic [N_INPUTS-1:0] addr,
  output logic                fire
);

  always_comb begin
    fire = 1'b0;
    for (int unsigned k = 0; k < N_TERMS; k++)
      if (addr == TERMS[k]) fire = 1'b1;
  end

endmodule
