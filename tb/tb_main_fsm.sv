// tb_main_fsm: drives the controller with payload streams as the UDP
// receiver would, stands in for the FIFO + cipher with a queue that returns
// each byte XOR 8'hA5 after a random delay, and for the transmitter with a
// busy flag held for a while.  Checks: rule download (addresses and words),
// the bytes and mode bit pushed to the FIFO, the restart pulse, the memory
// writes, the reply start with the requester's addresses and the byte
// count, the message-size cap, unknown commands, and requests dropped while
// busy.  MAX_BYTES is reduced to 32 to reach the cap.
module tb_main_fsm;
  import pca_pkg::*;
  logic clk = 0, rst_n = 0;
  logic pl_valid = 0, pl_first = 0, pl_last = 0;
  logic [7:0] pl_data = 0;
  logic [47:0] src_mac = 0; logic [31:0] src_ip = 0; logic [15:0] src_port = 0;
  logic fifo_wr; logic [8:0] fifo_wdata;
  logic cipher_restart, cipher_valid = 0, cipher_ready; logic [7:0] cipher_data = 0;
  logic rule_we; logic [5:0] rule_waddr; rule_word_t rule_wdata;
  logic [3:0] last_set;
  logic mem_we; logic [4:0] mem_waddr; logic [7:0] mem_wdata;
  logic tx_start; logic [47:0] tx_mac; logic [31:0] tx_ip; logic [15:0] tx_port;
  logic [5:0] tx_len; logic tx_busy = 0, busy_drop, idle;
  int checks = 0, failures = 0;

  main_fsm #(.MAX_BYTES(32), .RULE_AW(6)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    #2000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  task automatic expect_eq(input longint got, input longint exp, input string what);
    checks++;
    if (got != exp) begin failures++; $display("FAIL %s: %0h vs %0h", what, got, exp); end
  endtask

  // cipher stand-in and monitors
  logic [8:0] cq [$];
  logic [11:0] rules_seen [$]; int rule_addr_seen [$];
  logic [7:0] mem_seen [$]; int restarts = 0, starts = 0, drops = 0;
  int fifo_words = 0;
  logic exp_dec = 0;
  logic release_tx = 0;
  always @(posedge clk) if (rst_n) begin
    if (fifo_wr) begin cq.push_back(fifo_wdata); fifo_words++; end
    if (rule_we) begin rules_seen.push_back(rule_wdata); rule_addr_seen.push_back(int'(rule_waddr)); end
    if (mem_we) begin
      expect_eq(mem_waddr, mem_seen.size(), "memory address");
      mem_seen.push_back(mem_wdata);
    end
    if (cipher_restart) restarts++;
    if (tx_start) begin starts++; tx_busy <= 1'b1; end
    if (release_tx) tx_busy <= 1'b0;
    if (busy_drop) drops++;
  end
  always @(negedge clk) begin
    cipher_valid = 0;
    if (cq.size() != 0 && ($urandom % 8) == 0) begin
      logic [8:0] w;
      w = cq.pop_front();
      cipher_valid = 1; cipher_data = w[7:0] ^ 8'hA5;
    end
  end

  task automatic send(input byte unsigned p [$]);
    foreach (p[i]) begin
      @(negedge clk);
      pl_valid = 1; pl_data = p[i]; pl_first = (i == 0); pl_last = (i == p.size() - 1);
    end
    @(negedge clk); pl_valid = 0; pl_first = 0; pl_last = 0;
  endtask

  task automatic run_message(input byte cmd, input int n);
    byte unsigned p [$]; int kept;
    src_mac = {16'($urandom), 32'($urandom)}; src_ip = 32'($urandom); src_port = 16'($urandom);
    p.push_back(cmd);
    exp_dec = (cmd == 8'(CMD_DECRYPT));
    for (int i = 0; i < n; i++) p.push_back(8'($urandom));
    mem_seen.delete(); restarts = 0; starts = 0; fifo_words = 0;
    send(p);
    kept = (n > 32) ? 32 : n;
    fork
      begin
        int t = 0;
        while (starts == 0 && t < 5000) begin @(negedge clk); t++; end
      end
    join
    expect_eq(restarts, 1, "restart pulse");
    expect_eq(fifo_words, kept, "bytes to FIFO");
    expect_eq(starts, 1, "reply started");
    expect_eq(tx_len, kept, "reply length");
    expect_eq(tx_mac, src_mac, "reply mac");
    expect_eq(tx_ip, src_ip, "reply ip");
    expect_eq(tx_port, src_port, "reply port");
    for (int i = 0; i < kept; i++) expect_eq(mem_seen[i], p[i+1] ^ 8'hA5, "stored byte");
    // transmitter busy for a while; a request arriving now is dropped
    @(negedge clk);
    expect_eq(tx_busy, 1, "transmitter model busy");
    drops = 0;
    send('{8'(CMD_ENCRYPT), 8'h11, 8'h22});
    repeat (20) @(negedge clk);
    expect_eq(drops, 1, "request dropped while busy");
    expect_eq(idle, 0, "not idle while sending");
    release_tx = 1; @(negedge clk); release_tx = 0;
    repeat (3) @(negedge clk);
    expect_eq(idle, 1, "idle after reply");
    expect_eq(cq.size(), 0, "dropped request not processed");
  endtask

  initial begin
    byte unsigned p [$];
    logic [11:0] words [$];
    repeat (2) @(negedge clk); rst_n = 1;
    // rule download of 64 words
    p.push_back(8'(CMD_LOAD_RULES));
    for (int i = 0; i < 64; i++) begin
      logic [11:0] w;
      w = 12'($urandom);
      words.push_back(w);
      p.push_back({4'($urandom), w[11:8]}); p.push_back(w[7:0]);
    end
    send(p);
    repeat (3) @(negedge clk);
    expect_eq(rules_seen.size(), 64, "rule words written");
    for (int i = 0; i < 64 && i < rules_seen.size(); i++) begin
      expect_eq(rules_seen[i], words[i], "rule word");
      expect_eq(rule_addr_seen[i], i, "rule address");
    end
    expect_eq(idle, 1, "idle after rules");
    expect_eq(last_set, 15, "16 rule sets in use");
    // a shorter download of 6 sets and a stray word: 25 words
    p.delete(); rules_seen.delete(); rule_addr_seen.delete();
    p.push_back(8'(CMD_LOAD_RULES));
    for (int i = 0; i < 25; i++) begin p.push_back(8'(i >> 8)); p.push_back(8'(i)); end
    send(p);
    repeat (3) @(negedge clk);
    expect_eq(rules_seen.size(), 25, "short download words");
    expect_eq(last_set, 5, "6 rule sets in use");
    // messages
    run_message(8'(CMD_ENCRYPT), 20);
    expect_eq(cq.size(), 0, "queue empty");
    run_message(8'(CMD_DECRYPT), 5);
    run_message(8'(CMD_ENCRYPT), 40);       // capped at 32
    // mode bit
    cq.delete();
    exp_dec = 1; mem_seen.delete();
    send('{8'(CMD_DECRYPT), 8'h01});
    repeat (200) @(negedge clk);
    release_tx = 1; @(negedge clk); release_tx = 0;
    // unknown command: nothing happens
    repeat (50) @(negedge clk);
    restarts = 0; fifo_words = 0; starts = 0;
    send('{8'h7E, 8'h01, 8'h02});
    repeat (50) @(negedge clk);
    expect_eq(restarts + fifo_words + starts, 0, "unknown command ignored");
    expect_eq(idle, 1, "idle after unknown command");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // the mode bit follows the command
  always @(posedge clk) if (rst_n && fifo_wr) begin
    checks++;
    if (fifo_wdata[8] != exp_dec) begin failures++; $display("FAIL mode bit"); end
  end
endmodule
