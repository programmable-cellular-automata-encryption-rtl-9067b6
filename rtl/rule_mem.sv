// rule_mem: RAM holding the rule control words of the PCA cipher (the key).
//
// DEPTH words of RULE_W bits (rule_word_t).  The words are written through
// the write port before a message is processed ("downloaded") and read back
// in sequence by the cipher controller while it enciphers.  Word 4*s + k is
// the rule of pipeline stage k for rule set s.
// One synchronous write port and one asynchronous read port, i.e. a small
// distributed RAM; the read port is shared in time by the four PCAs.  The
// depth is this design's choice (the source gives none); contents are not
// reset.
module rule_mem
  import pca_pkg::*;
#(
  parameter int unsigned DEPTH = 256,
  localparam int unsigned AW   = $clog2(DEPTH)
) (
  input  logic       clk,
  input  logic       we,
  input  logic [AW-1:0] waddr,
  input  rule_word_t wdata,
  input  logic [AW-1:0] raddr,
  output rule_word_t rdata
);

  rule_word_t mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
  end

  assign rdata = mem[raddr];

endmodule
