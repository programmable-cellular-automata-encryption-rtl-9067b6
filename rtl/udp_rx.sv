// udp_rx: the receiving half of the board's UDP protocol engine.
//
// Takes the bytes of one Ethernet II frame at a time from the MAC (from the
// destination address to the end of the UDP data, preamble and FCS already
// removed), checks the headers on the fly and passes on the UDP payload of
// the frames addressed to the board: destination MAC equal to BOARD_MAC or
// broadcast, EtherType IPv4, a 20-byte IPv4 header, protocol UDP,
// destination IP equal to BOARD_IP, destination port equal to BOARD_PORT.
// The IPv4 and UDP checksums are not verified.  Every header check is done
// by byte 41, so the payload (bytes 42 .. 42 + UDP length - 9) streams out
// with one clock of delay and no buffering; Ethernet padding is discarded.
// The sender's MAC, IP and port are held on src_* for the reply.  A frame
// that fails a check yields a one-clock `drop` pulse at its end.
// The header layouts are the standard ones; the source names the UDP link
// but does not describe its hardware, so the structure here is this
// design's own.
module udp_rx
  import pca_pkg::*;
#(
  parameter logic [47:0] LOCAL_MAC  = BOARD_MAC,
  parameter logic [31:0] LOCAL_IP   = BOARD_IP,
  parameter logic [15:0] LOCAL_PORT = BOARD_PORT
) (
  input  logic        clk,
  input  logic        rst_n,
  // frame bytes from the MAC (no back-pressure)
  input  logic        rx_valid,
  input  logic [7:0]  rx_data,
  input  logic        rx_last,
  // UDP payload
  output logic        pl_valid,
  output logic [7:0]  pl_data,
  output logic        pl_first,
  output logic        pl_last,
  output logic [47:0] src_mac,
  output logic [31:0] src_ip,
  output logic [15:0] src_port,
  output logic        drop
);

  logic [10:0] cnt;          // byte index in the frame (saturates)
  logic        mac_local, mac_bcast, ok;
  logic [7:0]  udp_len_hi;   // high byte of the UDP length field
  logic [15:0] remaining;    // payload bytes still to come
  logic        in_payload;
  logic        accepted;     // the frame's payload started

  // expected byte of the board's own addresses at a frame index
  function automatic logic [7:0] mac_byte(input logic [47:0] m, input int unsigned i);
    return m[8*(5-i) +: 8];
  endfunction
  function automatic logic [7:0] ip_byte(input logic [31:0] a, input int unsigned i);
    return a[8*(3-i) +: 8];
  endfunction

  assign in_payload = ok && (cnt >= 11'(HDR_BYTES)) && (remaining != '0);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt <= '0; mac_local <= 1'b1; mac_bcast <= 1'b1; ok <= 1'b1;
      udp_len_hi <= '0; remaining <= '0; accepted <= 1'b0;
      pl_valid <= 1'b0; pl_data <= '0; pl_first <= 1'b0; pl_last <= 1'b0;
      src_mac <= '0; src_ip <= '0; src_port <= '0; drop <= 1'b0;
    end else begin
      pl_valid <= 1'b0;
      pl_first <= 1'b0;
      pl_last  <= 1'b0;
      drop     <= 1'b0;
      if (rx_valid) begin
        if (cnt != '1) cnt <= cnt + 1'b1;
        // header checks
        if (cnt < 11'd6) begin
          if (rx_data != mac_byte(LOCAL_MAC, int'(cnt))) mac_local <= 1'b0;
          if (rx_data != 8'hFF) mac_bcast <= 1'b0;
        end
        if (cnt == 11'd6 && !(mac_local || mac_bcast)) ok <= 1'b0;
        if (cnt >= 11'd6 && cnt < 11'd12) src_mac <= {src_mac[39:0], rx_data};
        if (cnt == 11'd12 && rx_data != 8'h08) ok <= 1'b0;
        if (cnt == 11'd13 && rx_data != 8'h00) ok <= 1'b0;
        if (cnt == 11'd14 && rx_data != 8'h45) ok <= 1'b0;
        if (cnt == 11'd23 && rx_data != 8'h11) ok <= 1'b0;
        if (cnt >= 11'd26 && cnt < 11'd30) src_ip <= {src_ip[23:0], rx_data};
        if (cnt >= 11'd30 && cnt < 11'd34 && rx_data != ip_byte(LOCAL_IP, int'(cnt) - 30)) ok <= 1'b0;
        if (cnt == 11'd34) src_port[15:8] <= rx_data;
        if (cnt == 11'd35) src_port[7:0]  <= rx_data;
        if (cnt == 11'd36 && rx_data != LOCAL_PORT[15:8]) ok <= 1'b0;
        if (cnt == 11'd37 && rx_data != LOCAL_PORT[7:0])  ok <= 1'b0;
        if (cnt == 11'd38) udp_len_hi <= rx_data;
        if (cnt == 11'd39) begin
          remaining <= ({udp_len_hi, rx_data} >= 16'd8) ? {udp_len_hi, rx_data} - 16'd8 : '0;
        end
        // payload
        if (in_payload) begin
          pl_valid  <= 1'b1;
          pl_data   <= rx_data;
          pl_first  <= !accepted;
          pl_last   <= (remaining == 16'd1) || rx_last;
          accepted  <= 1'b1;
          remaining <= remaining - 1'b1;
        end
        if (rx_last) begin
          drop <= !(in_payload || accepted);
          cnt <= '0; mac_local <= 1'b1; mac_bcast <= 1'b1; ok <= 1'b1;
          remaining <= '0; accepted <= 1'b0;
        end
      end
    end
  end

endmodule
