// tb_pca_cipher: self-checking test of the four-PCA pipelined cipher.
// A key of 16 rule sets is downloaded (rule words whose state cycles all
// divide 8, found by exhaustive search with the reference model; set 0 word 0
// is the <51,51,60,60,60,60,51,51> configuration).  Then:
//  1. a continuous encryption stream: every output must equal the reference
//     encryption with rule set j mod 16; bytes must be taken every 8 clocks
//     and the first result must appear 33 clocks after the first byte;
//  2. the ciphertexts fed back in decrypt mode must give the plaintext;
//  3. a stream with random mode per byte, random input gaps and random
//     output stalls (back-pressure) must still match the reference in order;
//  4. with last_set = 4 the rule sets must repeat every 5 bytes.
module tb_pca_cipher;
  import pca_pkg::*;
  import pca_ref_pkg::*;

  logic clk = 0, rst_n = 0, restart = 0;
  logic in_valid = 0, in_ready, in_decrypt = 0, out_valid, out_ready = 1, busy;
  logic [7:0] in_data = 0, out_data;
  logic rule_we = 0;
  logic [5:0] last_set = 6'd15;
  int nsets = 16;
  logic [7:0] rule_waddr = 0;
  rule_word_t rule_wdata = '0;
  int checks = 0, failures = 0;
  longint cycle = 0;

  pca_cipher dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cycle++;

  initial begin
    #3000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d (watchdog)", checks, failures);
    $finish;
  end

  logic [11:0] key [16][4];

  function automatic logic [7:0] expect_out(input logic [7:0] b, input int set, input bit dec);
    logic [11:0] w;
    for (int k = 0; k < 4; k++) begin
      w = key[set][dec ? 3 - k : k];
      b = ref_run(b, w[7:0], w[8], dec ? (8 - int'(w[11:9])) % 8 : int'(w[11:9]));
    end
    return b;
  endfunction

  // expected outputs, in order
  logic [7:0] exp_q [$];
  longint acc_cycles [$];
  longint out_cycles [$];
  int random_stall = 0;

  always @(posedge clk) begin
    if (!rst_n) ;
    else if (in_valid && in_ready) acc_cycles.push_back(cycle);
    if (rst_n && out_valid && out_ready) begin
      out_cycles.push_back(cycle);
      checks++;
      if (exp_q.size() == 0) begin
        failures++; $display("FAIL unexpected output %0d", out_data);
      end else begin
        logic [7:0] e;
        e = exp_q.pop_front();
        if (out_data !== e) begin
          failures++; $display("FAIL out=%0d expected=%0d", out_data, e);
        end
      end
    end
  end

  always @(negedge clk) if (random_stall != 0) out_ready = ($urandom % 3) != 0;

  int set_ptr = 0;
  task automatic send(input logic [7:0] b, input bit dec, input int gap);
    @(negedge clk);
    in_valid = 1; in_data = b; in_decrypt = dec;
    exp_q.push_back(expect_out(b, set_ptr, dec));
    set_ptr = (set_ptr + 1) % nsets;
    do @(posedge clk); while (!in_ready);
    @(negedge clk);
    in_valid = 0;
    repeat (gap) @(negedge clk);
  endtask

  task automatic do_restart();
    @(negedge clk); restart = 1; @(negedge clk); restart = 0; set_ptr = 0;
  endtask

  task automatic drain();
    int t = 0;
    while ((busy || exp_q.size() != 0) && t < 2000) begin @(negedge clk); t++; end
    checks++;
    if (exp_q.size() != 0) begin failures++; $display("FAIL %0d outputs missing", exp_q.size()); end
  endtask

  logic [7:0] plain [200], cipher [200];

  initial begin
    logic [7:0] c; logic s;
    // key: search random configurations whose cycles all divide 8
    for (int st = 0; st < 16; st++)
      for (int k = 0; k < 4; k++) begin
        if (st == 0 && k == 0) begin c = 8'b0011_1100; s = 0; end
        else do begin c = 8'($urandom); s = 1'($urandom); end while (!period_divides_8(c, s));
        key[st][k] = {3'(1 + $urandom % 7), s, c};
      end
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int a = 0; a < 64; a++) begin
      @(negedge clk); rule_we = 1; rule_waddr = 8'(a); rule_wdata = key[a / 4][a % 4];
    end
    @(negedge clk); rule_we = 0;

    // 1. continuous encryption, throughput and latency
    do_restart();
    for (int i = 0; i < 200; i++) begin
      plain[i] = 8'($urandom);
      send(plain[i], 0, 0);
    end
    drain();
    for (int i = 1; i < 200; i++) begin
      checks++;
      if (acc_cycles[i] - acc_cycles[i-1] != 8) begin
        failures++; $display("FAIL input interval %0d", acc_cycles[i] - acc_cycles[i-1]);
      end
    end
    checks++;
    if (out_cycles[0] - acc_cycles[0] != 33) begin
      failures++; $display("FAIL latency %0d", out_cycles[0] - acc_cycles[0]);
    end
    // capture the ciphertexts from the reference (already checked against the DUT)
    set_ptr = 0;
    for (int i = 0; i < 200; i++) begin
      cipher[i] = expect_out(plain[i], set_ptr, 0);
      set_ptr = (set_ptr + 1) % 16;
    end

    // 2. decryption of the ciphertexts restores the plaintext
    do_restart();
    for (int i = 0; i < 200; i++) begin
      checks++;
      if (expect_out(cipher[i], i % 16, 1) !== plain[i]) begin
        failures++; $display("FAIL reference round trip byte %0d", i);
      end
      send(cipher[i], 1, 0);
    end
    drain();

    // 3. random modes, gaps and stalls
    do_restart();
    random_stall = 1;
    for (int i = 0; i < 300; i++) send(8'($urandom), 1'($urandom), $urandom % 12);
    drain();
    random_stall = 0; out_ready = 1;

    // 4. a shorter rule-set sequence: 5 sets
    last_set = 6'd4; nsets = 5;
    do_restart();
    for (int i = 0; i < 40; i++) send(8'($urandom), 1'($urandom), 0);
    drain();

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
