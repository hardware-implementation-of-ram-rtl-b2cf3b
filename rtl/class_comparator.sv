// class_comparator: picks the dominant class in the decision chip (IC5).
//
// A tree of comparator-plus-multiplexer cells: each cell compares two
// (score, index) pairs and passes the larger on; the lower class index wins a
// tie, so the winner is the lowest-numbered class with the highest score.
// Inputs are padded to a power of two with empty entries that never win.
// The tree shape and tie rule are this design's choices.
//
// Interface: sums[c] is the score of class c; winner is its index on
// CLASS_W bits and best the winning score. Combinational.
module class_comparator #(
  parameter int unsigned N_CLASSES = 10,
  parameter int unsigned SUM_W     = 6,
  parameter int unsigned CLASS_W   = $clog2(N_CLASSES)
) (
  input  logic [N_CLASSES-1:0][SUM_W-1:0] sums,
  output logic [CLASS_W-1:0]              winner,
  output logic [SUM_W-1:0]                best
);

  localparam int unsigned LEVELS = $clog2(N_CLASSES);
  localparam int unsigned SLOTS  = 1 << LEVELS;

  typedef struct packed {
    logic               valid;
    logic [SUM_W-1:0]   score;
    logic [CLASS_W-1:0] index;
  } cand_t;

  // One array per tree level; level l has SLOTS >> l entries.
  cand_t level [LEVELS+1][SLOTS];

  always_comb begin
    for (int unsigned s = 0; s < SLOTS; s++) begin
      level[0][s].valid = (s < N_CLASSES);
      level[0][s].score = (s < N_CLASSES) ? sums[s] : '0;
      level[0][s].index = CLASS_W'(s);
    end
    for (int unsigned l = 1; l <= LEVELS; l++) begin
      for (int unsigned s = 0; s < SLOTS; s++) begin
        if (s < (SLOTS >> l)) begin
          // comparator: does the right (higher-index) entry strictly beat the left?
          if (level[l-1][2*s+1].valid &&
              (!level[l-1][2*s].valid || level[l-1][2*s+1].score > level[l-1][2*s].score))
            level[l][s] = level[l-1][2*s+1];
          else
            level[l][s] = level[l-1][2*s];
        end else begin
          level[l][s] = '0;
        end
      end
    end
  end

  // the padding entries can never win
  always_comb assert (32'(level[LEVELS][0].index) < N_CLASSES);

  assign winner = level[LEVELS][0].index;
  assign best   = level[LEVELS][0].score;

endmodule
