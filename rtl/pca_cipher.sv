// pca_cipher: four pipelined 8-cell PCAs, the rule memory and their control
// logic.  One byte is one cipher block; the same hardware enciphers and
// deciphers.
//
// Algorithm.  A byte is loaded as the seed of the first PCA.  PCA k
// (k = 0..3 here) applies one fundamental transformation: it evolves under
// word k of the current rule set for `steps` (1..7) clock cycles, and its
// final state seeds PCA k+1.  The state of PCA 3 is the ciphertext.  With
// rule words whose state-transition cycles all have length 8 (or a divisor
// of 8), running 8 - steps more cycles returns the seed, so deciphering
// applies the four words in reverse order (PCA k uses word 3-k) with
// (8 - steps) mod 8 cycles each.  Consecutive bytes use consecutive rule
// sets, wrapping after set `last_set` (at most NUM_SETS - 1, set by the rule
// download); `restart` goes back to set 0 (the start of a message).  The
// default 64 sets (256 words) can hold every one of the 156 eight-cycle rule
// configurations.
//
// Pipeline and timing.  All four PCAs advance together in rounds of 8
// clocks: one load cycle, in which every PCA takes the state of the one
// before it (PCA 0 takes in_data) and its new rule word, then 7 evolution
// cycles in which PCA k runs during the first steps_k of them and then
// holds.  Each round takes a new byte, so the throughput is one byte per 8
// clocks.  A byte accepted in the load cycle at clock t appears in out_data
// (out_valid = 1) at clock t + 33, after four rounds.  Rounds start only
// when there is work (an input byte or a byte in flight) and the output
// register is free; missing input enters the pipe as a bubble, so the pipe
// drains by itself.  The four rule words of the next round are read from the
// single rule-memory read port one after another: the words of PCAs 1 to 3
// in evolution cycles 1 to 3 (for the bytes that will move into them), the
// word of PCA 0 in the load cycle itself, so the reads never delay the
// pipeline.  Each stage carries its byte's valid bit, mode and rule-set
// number along, so the mode may change from byte to byte.
//
// Interface: valid/ready byte streams in and out (in_decrypt travels with
// in_data; in_ready is high only in a load cycle), and a write port for the
// rule memory, which may only be written while busy = 0.  NUM_SETS should be
// a power of two.
//
// What follows the source: four cascaded 8-cell PCAs, rules 51/60/102
// chosen by a 9-bit control word, 1..7 cycles per PCA, rules read in
// sequence from a RAM in parallel with enciphering.  This design's own
// choices: the fixed 8-clock round, the stream handshake, the rule-set
// sequencing and the reverse-order decryption schedule.
module pca_cipher
  import pca_pkg::*;
#(
  parameter int unsigned NUM_SETS = 64,
  localparam int unsigned DEPTH   = NUM_SETS * NUM_STAGES,
  localparam int unsigned AW      = $clog2(DEPTH),
  localparam int unsigned SW      = (NUM_SETS > 1) ? $clog2(NUM_SETS) : 1
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        restart,     // next byte uses rule set 0
  input  logic [SW-1:0] last_set,  // highest rule set in use (wrap point)
  // plaintext / ciphertext in
  input  logic        in_valid,
  output logic        in_ready,
  input  logic [7:0]  in_data,
  input  logic        in_decrypt,  // 1: decipher this byte
  // ciphertext / plaintext out
  output logic        out_valid,
  input  logic        out_ready,
  output logic [7:0]  out_data,
  // rule memory download
  input  logic          rule_we,
  input  logic [AW-1:0] rule_waddr,
  input  rule_word_t    rule_wdata,
  output logic          busy
);

  logic [2:0]    phase;                     // 0 = load cycle, 1..7 = evolution
  logic [SW-1:0] set_ptr;                   // rule set for the next input byte

  logic [NUM_STAGES-1:0] stg_valid, stg_dec;
  logic [SW-1:0]         stg_set   [NUM_STAGES];
  rule_word_t            stg_rule  [NUM_STAGES];  // active rule of each PCA
  logic [2:0]            stg_steps [NUM_STAGES];  // cycles to run this round
  rule_word_t            shadow    [NUM_STAGES];  // prefetched for next round
  logic [7:0]            pca_state [NUM_STAGES];

  logic       start;
  logic [AW-1:0] raddr;
  rule_word_t rdata;

  assign start    = (phase == 3'd0) && (in_valid || (|stg_valid)) && (!out_valid || out_ready);
  assign in_ready = (phase == 3'd0) && (!out_valid || out_ready);
  assign busy     = (|stg_valid) || out_valid || (phase != 3'd0);

  // word index inside a rule set used by stage k for a byte of mode dec
  function automatic logic [1:0] word_of(input int unsigned k, input logic dec);
    return dec ? 2'(NUM_STAGES - 1 - k) : 2'(k);
  endfunction

  function automatic logic [AW-1:0] addr_of(input logic [SW-1:0] set,
                                            input logic [1:0] word);
    return AW'(set) * AW'(NUM_STAGES) + AW'(word);
  endfunction

  // single read port: stage 0's word in the load cycle, stage p's word
  // (for the byte now in stage p-1) in evolution cycle p
  always_comb begin
    raddr = addr_of(set_ptr, word_of(0, in_decrypt));
    for (int unsigned p = 1; p < NUM_STAGES; p++)
      if (phase == 3'(p)) raddr = addr_of(stg_set[p-1], word_of(p, stg_dec[p-1]));
  end

  rule_mem #(.DEPTH(DEPTH)) u_rules (
    .clk  (clk),
    .we   (rule_we),
    .waddr(rule_waddr),
    .wdata(rule_wdata),
    .raddr(raddr),
    .rdata(rdata)
  );

  // the four PCAs, PCA k+1 seeded from PCA k
  for (genvar k = 0; k < NUM_STAGES; k++) begin : g_pca
    logic [7:0] seed;
    logic       run;
    if (k == 0) begin : g_first
      assign seed = in_data;
    end else begin : g_next
      assign seed = pca_state[k-1];
    end
    assign run = (phase != 3'd0) && (phase <= stg_steps[k]);
    pca8 u_pca (
      .clk       (clk),
      .load_data (start),
      .run       (run),
      .data_in   (seed),
      .rule_cells(stg_rule[k].cells),
      .sel102    (stg_rule[k].sel102),
      .state     (pca_state[k])
    );
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      phase     <= '0;
      set_ptr   <= '0;
      stg_valid <= '0;
      stg_dec   <= '0;
      out_valid <= 1'b0;
      out_data  <= '0;
      for (int k = 0; k < NUM_STAGES; k++) begin
        stg_set[k]   <= '0;
        stg_rule[k]  <= '0;
        stg_steps[k] <= '0;
        shadow[k]    <= '0;
      end
    end else begin
      if (out_valid && out_ready) out_valid <= 1'b0;

      if (start) begin
        // output register takes the finished byte of PCA 4
        if (stg_valid[NUM_STAGES-1]) begin
          out_valid <= 1'b1;
          out_data  <= pca_state[NUM_STAGES-1];
        end
        // byte bookkeeping moves one stage along
        stg_valid[0] <= in_valid;
        stg_dec[0]   <= in_decrypt;
        stg_set[0]   <= set_ptr;
        stg_rule[0]  <= rdata;
        stg_steps[0] <= in_decrypt ? 3'(-rdata.steps) : rdata.steps;
        for (int k = 1; k < NUM_STAGES; k++) begin
          stg_valid[k] <= stg_valid[k-1];
          stg_dec[k]   <= stg_dec[k-1];
          stg_set[k]   <= stg_set[k-1];
          stg_rule[k]  <= shadow[k];
          stg_steps[k] <= stg_dec[k-1] ? 3'(-shadow[k].steps) : shadow[k].steps;
        end
        if (in_valid) set_ptr <= (set_ptr >= last_set) ? '0 : set_ptr + 1'b1;
        phase <= 3'd1;
      end else if (phase != 3'd0) begin
        for (int unsigned p = 1; p < NUM_STAGES; p++)
          if (phase == 3'(p)) shadow[p] <= rdata;
        phase <= phase + 3'd1;   // 7 wraps to 0
      end

      if (restart) set_ptr <= '0;
    end
  end

  // output must hold while it waits for the consumer
  property p_out_hold;
    @(posedge clk) disable iff (!rst_n)
      out_valid && !out_ready |=> out_valid && $stable(out_data);
  endproperty
  a_out_hold: assert property (p_out_hold);

  // the rule memory is not rewritten under a running message
  a_no_write_busy: assert property (@(posedge clk) disable iff (!rst_n) rule_we |-> !busy);

endmodule
