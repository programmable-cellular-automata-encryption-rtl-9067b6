// byte_fifo: first-in first-out buffer between the UDP receiver and the PCA
// cipher.
//
// The receiver delivers payload bytes at line rate and cannot be stalled,
// while the cipher takes one byte per 8-clock round, so the FIFO must absorb
// a whole datagram: its default depth (1024 entries) holds one 1 KB message
// chunk.  The depth and the extra mode bit carried with each byte (WIDTH = 9)
// are this design's choices.  A write while full is dropped and flagged on
// `overflow` for one clock.
// Interface: write strobe on the input side; valid/ready on the output side,
// with the head entry visible (first-word fall-through).  Timing: a written
// entry is readable the next clock.
module byte_fifo #(
  parameter int unsigned WIDTH = 9,
  parameter int unsigned DEPTH = 1024,
  localparam int unsigned AW   = $clog2(DEPTH)
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             wr_en,
  input  logic [WIDTH-1:0] wr_data,
  output logic             full,
  output logic             overflow,
  output logic             rd_valid,
  input  logic             rd_ready,
  output logic [WIDTH-1:0] rd_data,
  output logic [AW:0]      level
);

  logic [WIDTH-1:0] mem [DEPTH];
  logic [AW-1:0] wp, rp;
  logic do_wr, do_rd;

  assign full     = (level == (AW+1)'(DEPTH));
  assign rd_valid = (level != '0);
  assign rd_data  = mem[rp];
  assign do_wr    = wr_en && !full;
  assign do_rd    = rd_valid && rd_ready;

  always_ff @(posedge clk) begin
    if (do_wr) mem[wp] <= wr_data;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wp <= '0;
      rp <= '0;
      level <= '0;
      overflow <= 1'b0;
    end else begin
      overflow <= wr_en && full;
      if (do_wr) wp <= (wp == AW'(DEPTH - 1)) ? '0 : wp + 1'b1;
      if (do_rd) rp <= (rp == AW'(DEPTH - 1)) ? '0 : rp + 1'b1;
      level <= level + (AW+1)'(do_wr) - (AW+1)'(do_rd);
    end
  end

endmodule
