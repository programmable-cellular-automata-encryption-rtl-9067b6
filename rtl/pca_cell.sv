// pca_cell: one cell of a programmable cellular automaton.
//
// A D flip-flop plus the cell's logic combinational circuit (LCC).  With
// load_data = 1 the flip-flop takes data_in.  Otherwise, when run = 1, it
// takes the next state given by the rule selected on the control lines
// s1/s0 and the states of the two neighbours:
//   s1 = 0          rule 51 : q' = ~q
//   s1 = 1, s0 = 0  rule 60 : q' = q ^ left   (left  = cell i-1)
//   s1 = 1, s0 = 1  rule 102: q' = q ^ right  (right = cell i+1)
// Loading, the rule multiplexing and the neighbour inputs follow the cell
// drawing of the design.  The run enable (hold the state when neither loading
// nor running) is this design's addition: it lets each PCA of the pipeline
// stop after its own cycle count.  The flip-flop has no reset, as in the
// drawing; its content is only meaningful after a load.
// Timing: the new state appears one clock after the controls are applied.
module pca_cell (
  input  logic clk,
  input  logic load_data,  // 1: load data_in
  input  logic run,        // 1 (and load_data = 0): evolve one step
  input  logic data_in,
  input  logic left,       // state of cell i-1 (0 at the boundary)
  input  logic right,      // state of cell i+1 (0 at the boundary)
  input  logic s1,         // 0: rule 51, 1: additive rule chosen by s0
  input  logic s0,         // 0: rule 60, 1: rule 102
  output logic q
);

  logic evolved, d;

  // LCC: rule multiplexer, then load multiplexer
  always_comb begin
    if (!s1)     evolved = ~q;
    else if (s0) evolved = q ^ right;
    else         evolved = q ^ left;
    if (load_data) d = data_in;
    else if (run)  d = evolved;
    else           d = q;
  end

  always_ff @(posedge clk) q <= d;

endmodule
