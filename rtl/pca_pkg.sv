// pca_pkg: types and constants shared by the programmable-cellular-automaton
// (PCA) block cipher and its UDP front end.
//
// A rule control word configures one 8-cell PCA for one transformation:
//   cells[i] = 0 -> cell i applies rule 51  (a_i' = ~a_i)
//   cells[i] = 1 -> cell i applies rule 60  (a_i' = a_i ^ a_{i-1}) when sel102 = 0
//                                  rule 102 (a_i' = a_i ^ a_{i+1}) when sel102 = 1
//   steps        -> number of evolution clock cycles (1..7) in encrypt mode;
//                   decryption runs (8 - steps) mod 8 cycles.
// Eight per-cell bits plus one shared bit give the 512 rule combinations of
// the design; the shared ninth line and the per-cell lines follow the PCA
// structure drawing.  The 3-bit step count stored alongside is this design's
// choice of where the per-transformation cycle count lives.
package pca_pkg;

  localparam int unsigned CELLS      = 8;   // cells per PCA (one byte)
  localparam int unsigned NUM_STAGES = 4;   // pipelined PCAs

  typedef struct packed {
    logic [2:0]       steps;   // evolution cycles, encrypt direction
    logic             sel102;  // shared "Rule8" line: 0 -> rule 60, 1 -> rule 102
    logic [CELLS-1:0] cells;   // per-cell "Rule0..Rule7" lines: 0 -> rule 51
  } rule_word_t;               // 12 bits

  localparam int unsigned RULE_W = $bits(rule_word_t);

  // First payload byte of a request datagram (this design's framing).
  typedef enum logic [7:0] {
    CMD_ENCRYPT = 8'h01,
    CMD_DECRYPT = 8'h02,
    CMD_LOAD_RULES = 8'h03
  } cmd_e;


  // Network identity of the board (address values as shown by the host
  // application; the UDP port number is this design's choice).
  localparam logic [47:0] BOARD_MAC  = 48'h00_11_22_33_44_55;
  localparam logic [31:0] BOARD_IP   = {8'd192, 8'd168, 8'd0, 8'd6};
  localparam logic [15:0] BOARD_PORT = 16'd5000;

  // Ethernet II + IPv4 (no options) + UDP header bytes before the payload
  localparam int unsigned HDR_BYTES   = 42;
  localparam int unsigned MIN_FRAME   = 60;   // without the FCS
  localparam int unsigned MAX_PAYLOAD = 1024;

endpackage
