// msg_mem: the 1 KB message memory.  The cipher's output bytes are written
// here as they leave the PCA pipeline, and the transmitter reads them back
// to send the processed datagram to the host.
// DEPTH bytes (default 1024, the 1 KB of the source), one synchronous write
// port and one asynchronous read port (the read data follows raddr in the
// same clock).  Contents are not reset.
module msg_mem #(
  parameter int unsigned DEPTH = 1024,
  localparam int unsigned AW   = $clog2(DEPTH)
) (
  input  logic          clk,
  input  logic          we,
  input  logic [AW-1:0] waddr,
  input  logic [7:0]    wdata,
  input  logic [AW-1:0] raddr,
  output logic [7:0]    rdata
);

  logic [7:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
  end

  assign rdata = mem[raddr];

endmodule
