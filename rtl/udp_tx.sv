// udp_tx: the sending half of the board's UDP protocol engine.
//
// On `start` it sends one Ethernet II / IPv4 / UDP frame to the MAC whose
// payload is the first `len` bytes of the message memory, read through
// mem_raddr / mem_rdata (asynchronous read).  Source addresses are the
// board's, destination addresses come from the request being answered.
// The IPv4 header has no options, identification 0, "don't fragment", TTL 64
// and a checksum computed from the latched fields before the first byte;
// the UDP checksum is sent as 0 (none), which IPv4 allows.  Frames shorter
// than 60 bytes are padded with zeros.  The FCS is left to the MAC.
// Interface: valid/ready byte stream with tx_last on the final byte; `busy`
// from start until that byte is taken.  Timing: one byte per clock while
// tx_ready is high; the first byte is offered the clock after start.
// The field values are this design's choices; the source only names the
// UDP link.
module udp_tx
  import pca_pkg::*;
#(
  parameter logic [47:0] LOCAL_MAC  = BOARD_MAC,
  parameter logic [31:0] LOCAL_IP   = BOARD_IP,
  parameter logic [15:0] LOCAL_PORT = BOARD_PORT,
  parameter int unsigned MEM_DEPTH  = MAX_PAYLOAD,
  localparam int unsigned MAW       = $clog2(MEM_DEPTH)
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           start,
  input  logic [47:0]    dst_mac,
  input  logic [31:0]    dst_ip,
  input  logic [15:0]    dst_port,
  input  logic [MAW:0]   len,
  output logic [MAW-1:0] mem_raddr,
  input  logic [7:0]     mem_rdata,
  output logic           tx_valid,
  input  logic           tx_ready,
  output logic [7:0]     tx_data,
  output logic           tx_last,
  output logic           busy
);

  logic [47:0] r_mac;
  logic [31:0] r_ip;
  logic [15:0] r_port, r_len, ip_len, udp_len, csum;
  logic [10:0] idx, frame_len;

  assign ip_len    = r_len + 16'd28;
  assign udp_len   = r_len + 16'd8;
  assign frame_len = (r_len + 16'(HDR_BYTES) < 16'(MIN_FRAME)) ? 11'(MIN_FRAME)
                                                               : 11'(r_len + 16'(HDR_BYTES));

  // one's-complement header checksum over the ten 16-bit header words
  always_comb begin
    logic [19:0] sum;
    sum = 20'h4500 + 20'(ip_len) + 20'h0000 + 20'h4000 + 20'h4011
        + 20'(LOCAL_IP[31:16]) + 20'(LOCAL_IP[15:0]) + 20'(r_ip[31:16]) + 20'(r_ip[15:0]);
    sum = 20'(sum[15:0]) + 20'(sum[19:16]);
    sum = 20'(sum[15:0]) + 20'(sum[19:16]);
    csum = ~sum[15:0];
  end

  assign mem_raddr = MAW'(idx - 11'(HDR_BYTES));

  always_comb begin
    unique case (idx)
      11'd0, 11'd1, 11'd2, 11'd3, 11'd4, 11'd5:
        tx_data = r_mac[8*(5 - int'(idx)) +: 8];
      11'd6, 11'd7, 11'd8, 11'd9, 11'd10, 11'd11:
        tx_data = LOCAL_MAC[8*(11 - int'(idx)) +: 8];
      11'd12: tx_data = 8'h08;              // EtherType IPv4
      11'd13: tx_data = 8'h00;
      11'd14: tx_data = 8'h45;              // version 4, 20-byte header
      11'd15: tx_data = 8'h00;              // TOS
      11'd16: tx_data = ip_len[15:8];
      11'd17: tx_data = ip_len[7:0];
      11'd18, 11'd19: tx_data = 8'h00;      // identification
      11'd20: tx_data = 8'h40;              // don't fragment
      11'd21: tx_data = 8'h00;
      11'd22: tx_data = 8'd64;              // TTL
      11'd23: tx_data = 8'h11;              // UDP
      11'd24: tx_data = csum[15:8];
      11'd25: tx_data = csum[7:0];
      11'd26, 11'd27, 11'd28, 11'd29:
        tx_data = LOCAL_IP[8*(29 - int'(idx)) +: 8];
      11'd30, 11'd31, 11'd32, 11'd33:
        tx_data = r_ip[8*(33 - int'(idx)) +: 8];
      11'd34: tx_data = LOCAL_PORT[15:8];
      11'd35: tx_data = LOCAL_PORT[7:0];
      11'd36: tx_data = r_port[15:8];
      11'd37: tx_data = r_port[7:0];
      11'd38: tx_data = udp_len[15:8];
      11'd39: tx_data = udp_len[7:0];
      11'd40, 11'd41: tx_data = 8'h00;      // no UDP checksum
      default: tx_data = (16'(idx) < r_len + 16'(HDR_BYTES)) ? mem_rdata : 8'h00;
    endcase
  end

  assign tx_valid = busy;
  assign tx_last  = busy && (idx == frame_len - 11'd1);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy <= 1'b0; idx <= '0;
      r_mac <= '0; r_ip <= '0; r_port <= '0; r_len <= '0;
    end else if (!busy) begin
      if (start) begin
        busy   <= 1'b1;
        idx    <= '0;
        r_mac  <= dst_mac;
        r_ip   <= dst_ip;
        r_port <= dst_port;
        r_len  <= 16'(len);
      end
    end else if (tx_ready) begin
      if (tx_last) busy <= 1'b0;
      idx <= idx + 1'b1;
    end
  end

endmodule
