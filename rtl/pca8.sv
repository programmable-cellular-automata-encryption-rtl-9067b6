// pca8: an N-cell one-dimensional programmable cellular automaton (N = 8,
// one byte), built from pca_cell instances.
//
// Cell i holds bit i of the state.  Cell i-1 (bit i-1) is its left
// neighbour and cell i+1 its right one; the two ends see a constant 0 (null
// boundary), as in the PCA structure drawing.  Every cell gets its own rule
// line rule.cells[i] (its s1) and the shared line rule.sel102 (its s0), plus
// the common load_data and the per-bit data_in.  The step count of the rule
// word is not used here; the controller drives `run` for that many cycles.
// Timing: state updates one clock after load_data or run.
module pca8
  import pca_pkg::*;
#(
  parameter int unsigned N = CELLS
) (
  input  logic         clk,
  input  logic         load_data,
  input  logic         run,
  input  logic [N-1:0] data_in,
  input  logic [N-1:0] rule_cells,  // per-cell rule line: 0 -> rule 51
  input  logic         sel102,      // shared rule line: 0 -> rule 60, 1 -> rule 102
  output logic [N-1:0] state
);

  // state padded with the null boundary: ext[0] and ext[N+1] are 0
  logic [N+1:0] ext;
  assign ext = {1'b0, state, 1'b0};

  for (genvar i = 0; i < N; i++) begin : g_cell
    pca_cell u_cell (
      .clk      (clk),
      .load_data(load_data),
      .run      (run),
      .data_in  (data_in[i]),
      .left     (ext[i]),
      .right    (ext[i+2]),
      .s1       (rule_cells[i]),
      .s0       (sel102),
      .q        (state[i])
    );
  end

endmodule
