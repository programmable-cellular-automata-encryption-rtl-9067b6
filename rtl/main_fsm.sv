// main_fsm: the system controller that ties the UDP engine to the cipher.
//
// A request datagram's first payload byte is a command (cmd_e):
//   CMD_LOAD_RULES  the rest of the payload is a list of rule words, two
//                   bytes each, high byte first (bits 11..8 in the low nibble
//                   of the first byte), written to rule memory from address 0;
//                   the number of complete sets of four words becomes the
//                   length of the rule-set sequence (last_set); no reply is
//                   sent.
//   CMD_ENCRYPT /   the rest of the payload (at most MAX_BYTES bytes, more are
//   CMD_DECRYPT     ignored) is the message.  Each byte is pushed, with its
//                   mode bit, into the receive FIFO as it arrives; the cipher
//                   restarts its rule sequence for the datagram.  Bytes that
//                   leave the cipher are stored in the message memory.  When
//                   all are stored, a reply datagram carrying them is sent
//                   back to the requester's MAC, IP and port.
// Unknown commands are ignored, and a datagram that arrives while a previous
// one is still being processed is dropped (`busy_drop` pulses).
// Outputs that are plain wires: the FIFO byte is the payload byte, the
// memory write is the cipher output (the memory always accepts, so
// cipher_ready is 1), and the low rule-word byte is the payload byte.
// States: IDLE -> RX_MSG -> WAIT_CIPHER -> SEND -> IDLE, or
// IDLE -> RX_RULES -> IDLE, or IDLE -> SKIP -> IDLE.
// The receive / FIFO / cipher / memory / transmit order follows the
// system's data path; the command byte and the reply format are this
// design's choices, as the source does not describe the host protocol.
module main_fsm
  import pca_pkg::*;
#(
  parameter int unsigned MAX_BYTES = MAX_PAYLOAD,
  parameter int unsigned RULE_AW   = 8,
  localparam int unsigned MAW      = $clog2(MAX_BYTES),
  localparam int unsigned SW       = RULE_AW - 2
) (
  input  logic        clk,
  input  logic        rst_n,
  // payload from udp_rx
  input  logic        pl_valid,
  input  logic [7:0]  pl_data,
  input  logic        pl_first,
  input  logic        pl_last,
  input  logic [47:0] src_mac,
  input  logic [31:0] src_ip,
  input  logic [15:0] src_port,
  // receive FIFO write side: {decrypt, byte}
  output logic        fifo_wr,
  output logic [8:0]  fifo_wdata,
  // cipher control and output
  output logic        cipher_restart,
  input  logic        cipher_valid,
  output logic        cipher_ready,
  input  logic [7:0]  cipher_data,
  output logic        rule_we,
  output logic [RULE_AW-1:0] rule_waddr,
  output rule_word_t  rule_wdata,
  output logic [SW-1:0] last_set,   // highest complete rule set downloaded
  // message memory write side
  output logic           mem_we,
  output logic [MAW-1:0] mem_waddr,
  output logic [7:0]     mem_wdata,
  // transmitter
  output logic        tx_start,
  output logic [47:0] tx_mac,
  output logic [31:0] tx_ip,
  output logic [15:0] tx_port,
  output logic [MAW:0] tx_len,
  input  logic        tx_busy,
  output logic        busy_drop,
  output logic        idle
);

  typedef enum logic [2:0] {IDLE, RX_MSG, RX_RULES, SKIP, WAIT_CIPHER, SEND} state_e;
  state_e state;

  logic          decrypt;
  logic [MAW:0]  n_rx, n_done;
  logic          hi_phase;     // next rule byte is the high byte
  logic [3:0]    hi_byte;

  assign idle         = (state == IDLE);
  assign cipher_ready = 1'b1;                 // memory always accepts
  assign mem_we       = cipher_valid;
  assign mem_waddr    = MAW'(n_done);
  assign mem_wdata    = cipher_data;
  assign fifo_wdata   = {decrypt, pl_data};
  assign fifo_wr      = (state == RX_MSG) && pl_valid && (n_rx < (MAW+1)'(MAX_BYTES));
  assign rule_wdata   = rule_word_t'({hi_byte, pl_data});
  assign rule_we      = (state == RX_RULES) && pl_valid && !hi_phase;
  assign tx_len       = n_rx;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= IDLE;
      decrypt <= 1'b0; n_rx <= '0; n_done <= '0;
      hi_phase <= 1'b1; hi_byte <= '0; rule_waddr <= '0;
      cipher_restart <= 1'b0; tx_start <= 1'b0; busy_drop <= 1'b0;
      last_set <= '1;
      tx_mac <= '0; tx_ip <= '0; tx_port <= '0;
    end else begin
      cipher_restart <= 1'b0;
      tx_start       <= 1'b0;
      busy_drop      <= 1'b0;
      if (cipher_valid) n_done <= n_done + 1'b1;
      unique case (state)
        IDLE: if (pl_valid && pl_first) begin
          tx_mac  <= src_mac;
          tx_ip   <= src_ip;
          tx_port <= src_port;
          n_rx    <= '0;
          n_done  <= '0;
          hi_phase   <= 1'b1;
          rule_waddr <= '0;
          if (pl_data == CMD_ENCRYPT || pl_data == CMD_DECRYPT) begin
            decrypt        <= (pl_data == CMD_DECRYPT);
            cipher_restart <= 1'b1;
            state <= pl_last ? IDLE : RX_MSG;
          end else if (pl_data == CMD_LOAD_RULES) begin
            state <= pl_last ? IDLE : RX_RULES;
          end else begin
            state <= pl_last ? IDLE : SKIP;
          end
        end
        RX_MSG: if (pl_valid) begin
          if (fifo_wr) n_rx <= n_rx + 1'b1;
          if (pl_last) state <= WAIT_CIPHER;
        end
        RX_RULES: if (pl_valid) begin
          hi_phase <= !hi_phase;
          if (hi_phase) hi_byte <= pl_data[3:0];
          else begin
            rule_waddr <= rule_waddr + 1'b1;
            // a set is complete with its fourth word
            if (rule_waddr[1:0] == 2'd3) last_set <= rule_waddr[RULE_AW-1:2];
          end
          if (pl_last) state <= IDLE;
        end
        SKIP: if (pl_valid && pl_last) state <= IDLE;
        WAIT_CIPHER: if (n_done == n_rx) begin
          if (n_rx == '0) state <= IDLE;
          else begin
            tx_start <= 1'b1;
            state    <= SEND;
          end
        end
        SEND: if (!tx_start && !tx_busy) state <= IDLE;
        default: state <= IDLE;
      endcase
      // a new datagram while one is still in progress is ignored
      if (pl_valid && pl_first && state != IDLE) busy_drop <= 1'b1;
    end
  end

endmodule
