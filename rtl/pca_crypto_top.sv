// pca_crypto_top: the complete PCA encryption system on its network link.
//
// A host sends datagrams to the board over UDP.  udp_rx extracts the payload
// of those addressed to the board; main_fsm reads the command byte and either
// downloads rule words into the cipher's rule memory or feeds the message
// bytes through the receive FIFO into pca_cipher, the four pipelined PCAs,
// collects the processed bytes in the 1 KB msg_mem and has udp_tx send them
// back to the requester.  Enciphering and deciphering share all the hardware;
// only the command byte differs.
// The Ethernet PHY and MAC are outside: the ports are the MAC's byte streams
// (frame from destination address to the end of the UDP data, no preamble,
// no FCS).  Receive has no back-pressure; transmit is valid/ready.
// Status outputs: `idle` (ready for a request), `drop_frame` (a frame not for
// the board), `busy_drop` (a request arrived while one was in progress),
// `fifo_overflow` (never expected with the default sizes).
// Defaults: 64 rule sets (256 rule words), a 1 KB message memory and a
// 1024-entry receive FIFO, board MAC 00-11-22-33-44-55, IP 192.168.0.6,
// UDP port 5000.
module pca_crypto_top
  import pca_pkg::*;
#(
  parameter int unsigned NUM_SETS   = 64,
  parameter int unsigned MSG_BYTES  = MAX_PAYLOAD,
  parameter int unsigned FIFO_DEPTH = MAX_PAYLOAD,
  parameter logic [47:0] LOCAL_MAC  = BOARD_MAC,
  parameter logic [31:0] LOCAL_IP   = BOARD_IP,
  parameter logic [15:0] LOCAL_PORT = BOARD_PORT
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       rx_valid,
  input  logic [7:0] rx_data,
  input  logic       rx_last,
  output logic       tx_valid,
  input  logic       tx_ready,
  output logic [7:0] tx_data,
  output logic       tx_last,
  output logic       idle,
  output logic       drop_frame,
  output logic       busy_drop,
  output logic       fifo_overflow
);

  localparam int unsigned MAW     = $clog2(MSG_BYTES);
  localparam int unsigned RULE_AW = $clog2(NUM_SETS * NUM_STAGES);
  localparam int unsigned FAW     = $clog2(FIFO_DEPTH);

  logic        pl_valid, pl_first, pl_last;
  logic [7:0]  pl_data;
  logic [47:0] src_mac, tx_mac;
  logic [31:0] src_ip, tx_ip;
  logic [15:0] src_port, tx_port;

  logic        fifo_wr, fifo_full, fifo_rd_valid, fifo_rd_ready;
  logic [8:0]  fifo_wdata, fifo_rdata;
  logic [FAW:0] fifo_level;

  logic        cipher_restart, cipher_valid, cipher_ready, cipher_busy;
  logic [7:0]  cipher_data;
  logic        rule_we;
  logic [RULE_AW-1:0] rule_waddr;
  rule_word_t  rule_wdata;
  logic [RULE_AW-3:0] last_set;

  logic           mem_we;
  logic [MAW-1:0] mem_waddr, mem_raddr;
  logic [7:0]     mem_wdata, mem_rdata;

  logic           tx_start, tx_busy;
  logic [MAW:0]   tx_len;

  udp_rx #(.LOCAL_MAC(LOCAL_MAC), .LOCAL_IP(LOCAL_IP), .LOCAL_PORT(LOCAL_PORT)) u_rx (
    .clk, .rst_n, .rx_valid, .rx_data, .rx_last,
    .pl_valid, .pl_data, .pl_first, .pl_last,
    .src_mac, .src_ip, .src_port, .drop(drop_frame)
  );

  main_fsm #(.MAX_BYTES(MSG_BYTES), .RULE_AW(RULE_AW)) u_fsm (
    .clk, .rst_n,
    .pl_valid, .pl_data, .pl_first, .pl_last, .src_mac, .src_ip, .src_port,
    .fifo_wr, .fifo_wdata,
    .cipher_restart, .cipher_valid, .cipher_ready, .cipher_data,
    .rule_we, .rule_waddr, .rule_wdata, .last_set,
    .mem_we, .mem_waddr, .mem_wdata,
    .tx_start, .tx_mac, .tx_ip, .tx_port, .tx_len, .tx_busy,
    .busy_drop, .idle
  );

  byte_fifo #(.WIDTH(9), .DEPTH(FIFO_DEPTH)) u_fifo (
    .clk, .rst_n,
    .wr_en(fifo_wr), .wr_data(fifo_wdata), .full(fifo_full), .overflow(fifo_overflow),
    .rd_valid(fifo_rd_valid), .rd_ready(fifo_rd_ready), .rd_data(fifo_rdata),
    .level(fifo_level)
  );

  pca_cipher #(.NUM_SETS(NUM_SETS)) u_cipher (
    .clk, .rst_n,
    .restart   (cipher_restart),
    .last_set  (last_set),
    .in_valid  (fifo_rd_valid),
    .in_ready  (fifo_rd_ready),
    .in_data   (fifo_rdata[7:0]),
    .in_decrypt(fifo_rdata[8]),
    .out_valid (cipher_valid),
    .out_ready (cipher_ready),
    .out_data  (cipher_data),
    .rule_we, .rule_waddr, .rule_wdata,
    .busy      (cipher_busy)
  );

  msg_mem #(.DEPTH(MSG_BYTES)) u_mem (
    .clk, .we(mem_we), .waddr(mem_waddr), .wdata(mem_wdata),
    .raddr(mem_raddr), .rdata(mem_rdata)
  );

  udp_tx #(.LOCAL_MAC(LOCAL_MAC), .LOCAL_IP(LOCAL_IP), .LOCAL_PORT(LOCAL_PORT),
           .MEM_DEPTH(MSG_BYTES)) u_tx (
    .clk, .rst_n, .start(tx_start),
    .dst_mac(tx_mac), .dst_ip(tx_ip), .dst_port(tx_port), .len(tx_len),
    .mem_raddr, .mem_rdata,
    .tx_valid, .tx_ready, .tx_data, .tx_last, .busy(tx_busy)
  );

  // rule memory is only written between messages
  a_rules_quiet: assert property (@(posedge clk) disable iff (!rst_n) rule_we |-> !cipher_busy);

endmodule
