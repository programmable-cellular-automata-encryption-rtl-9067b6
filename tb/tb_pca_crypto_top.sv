// tb_pca_crypto_top: end-to-end test of the whole system at its default
// parameters, acting as the host computer on the Ethernet link.
//  - downloads keys of 16, 64 and 10 rule sets (words whose state cycles
//    all divide 8) in CMD_LOAD_RULES datagrams;
//  - sends messages (up to a full 1 KB chunk) in CMD_ENCRYPT datagrams and
//    checks the reply frames against the reference cipher (byte j of a
//    datagram uses rule set j mod the number of sets downloaded);
//  - sends the ciphertexts back in CMD_DECRYPT datagrams and checks that the
//    plaintext returns;
//  - sends a frame for another IP (must be dropped), a request while a
//    reply is still being sent (must be dropped), and applies random MAC
//    back-pressure on transmit.
// Each of these mechanisms is counted and must have happened at least once.
module tb_pca_crypto_top;
  import pca_pkg::*;
  import pca_ref_pkg::*;
  import net_ref_pkg::*;

  logic clk = 0, rst_n = 0;
  logic rx_valid = 0, rx_last = 0, tx_valid, tx_ready = 1, tx_last;
  logic [7:0] rx_data = 0, tx_data;
  logic idle, drop_frame, busy_drop, fifo_overflow;
  int checks = 0, failures = 0;

  pca_crypto_top dut (.*);
  always #10 clk = ~clk;   // 50 MHz

  initial begin
    #50ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d (watchdog)", checks, failures);
    $finish;
  end

  localparam logic [47:0] HOST_MAC = 48'h02_00_00_00_00_28;
  localparam logic [31:0] HOST_IP  = {8'd192, 8'd168, 8'd0, 8'd40};
  localparam logic [15:0] HOST_PORT = 16'd40000;

  logic [11:0] key [64][4];
  int nsets = 16;
  int n_enc = 0, n_dec = 0, n_rules = 0, n_drop_frame = 0, n_busy_drop = 0, n_tx_stall = 0;
  int n_full_chunk = 0, n_padded = 0;
  int nsets_list [2] = '{64, 10};

  // received frames
  bytes_t rxq [$];
  bytes_t cur;
  always @(posedge clk) if (rst_n) begin
    if (tx_valid && !tx_ready) n_tx_stall++;
    if (tx_valid && tx_ready) begin
      cur.push_back(tx_data);
      if (tx_last) begin rxq.push_back(cur); cur.delete(); end
    end
    if (drop_frame) n_drop_frame++;
    if (busy_drop) n_busy_drop++;
    if (fifo_overflow) begin failures++; $display("FAIL FIFO overflow"); end
  end
  always @(negedge clk) tx_ready = ($urandom % 5) != 0;

  task automatic expect_eq(input longint got, input longint exp, input string what);
    checks++;
    if (got != exp) begin failures++; $display("FAIL %s: %0h vs %0h", what, got, exp); end
  endtask

  task automatic put_frame(input bytes_t f);
    foreach (f[i]) begin
      @(negedge clk); rx_valid = 1; rx_data = f[i]; rx_last = (i == f.size() - 1);
    end
    @(negedge clk); rx_valid = 0; rx_last = 0;
    repeat (12) @(negedge clk);   // inter-frame gap
  endtask

  task automatic request(input byte unsigned cmd, input bytes_t data);
    bytes_t p;
    p.push_back(cmd);
    foreach (data[i]) p.push_back(data[i]);
    put_frame(build_frame(BOARD_MAC, HOST_MAC, HOST_IP, BOARD_IP, HOST_PORT, BOARD_PORT, p));
  endtask

  function automatic logic [7:0] ref_byte(input logic [7:0] b, input int j, input bit dec);
    logic [11:0] w;
    for (int k = 0; k < 4; k++) begin
      w = key[j % nsets][dec ? 3 - k : k];
      b = ref_run(b, w[7:0], w[8], dec ? (8 - int'(w[11:9])) % 8 : int'(w[11:9]));
    end
    return b;
  endfunction

  // wait for one reply and return its payload
  task automatic get_reply(output bytes_t pl);
    int t = 0;
    bytes_t f;
    while (rxq.size() == 0 && t < 200000) begin @(negedge clk); t++; end
    pl.delete();
    checks++;
    if (rxq.size() == 0) begin failures++; $display("FAIL no reply"); return; end
    f = rxq.pop_front();
    for (int i = 0; i < 6; i++) expect_eq(f[i], HOST_MAC[8*(5-i) +: 8], "reply dst mac");
    expect_eq({f[30], f[31], f[32], f[33]}, HOST_IP, "reply dst ip");
    expect_eq({f[36], f[37]}, HOST_PORT, "reply dst port");
    for (int i = 0; i < int'({f[38], f[39]}) - 8; i++) pl.push_back(f[42 + i]);
    if (f.size() > 42 + pl.size()) n_padded++;
  endtask

  task automatic round_trip(input int len);
    bytes_t msg, ct, pt;
    for (int i = 0; i < len; i++) msg.push_back(8'($urandom));
    request(8'(CMD_ENCRYPT), msg);
    get_reply(ct);
    n_enc++;
    expect_eq(ct.size(), len, "ciphertext length");
    for (int i = 0; i < len && i < ct.size(); i++)
      if (ct[i] != ref_byte(msg[i], i, 0)) begin
        failures++; $display("FAIL ciphertext byte %0d of %0d", i, len); break;
      end
    checks++;
    wait (idle);
    repeat (20) @(negedge clk);
    request(8'(CMD_DECRYPT), ct);
    get_reply(pt);
    n_dec++;
    expect_eq(pt.size(), len, "plaintext length");
    for (int i = 0; i < len && i < pt.size(); i++)
      if (pt[i] != msg[i]) begin
        failures++; $display("FAIL plaintext byte %0d of %0d", i, len); break;
      end
    checks++;
    if (len == MAX_PAYLOAD) n_full_chunk++;
    wait (idle);
    repeat (20) @(negedge clk);
  endtask

  initial begin
    bytes_t kp, dummy;
    logic [7:0] c; logic s;
    for (int st = 0; st < 64; st++)
      for (int k = 0; k < 4; k++) begin
        if (st == 0 && k == 0) begin c = 8'b0011_1100; s = 0; end
        else do begin c = 8'($urandom); s = 1'($urandom); end while (!period_divides_8(c, s));
        key[st][k] = {3'(1 + $urandom % 7), s, c};
      end
    repeat (5) @(negedge clk);
    rst_n = 1;
    repeat (5) @(negedge clk);

    // key download
    for (int a = 0; a < 64; a++) begin
      kp.push_back({4'h0, key[a / 4][a % 4][11:8]});
      kp.push_back(key[a / 4][a % 4][7:0]);
    end
    request(8'(CMD_LOAD_RULES), kp);
    n_rules++;
    wait (idle);

    // a frame for another host is ignored
    dummy = '{8'(CMD_ENCRYPT), 8'h55};
    put_frame(build_frame(BOARD_MAC, HOST_MAC, HOST_IP, BOARD_IP ^ 32'h1, HOST_PORT, BOARD_PORT, dummy));

    round_trip(5);
    round_trip(77);
    round_trip(MAX_PAYLOAD);

    // a key of the full 64 sets, then a shorter one of 10 sets
    foreach (nsets_list[n]) begin
      nsets = nsets_list[n];
      kp.delete();
      for (int a = 0; a < 4 * nsets; a++) begin
        kp.push_back({4'h0, key[a / 4][a % 4][11:8]});
        kp.push_back(key[a / 4][a % 4][7:0]);
      end
      request(8'(CMD_LOAD_RULES), kp);
      n_rules++;
      wait (idle);
      round_trip(300);
    end

    // a request while the reply of another is going out is dropped
    begin
      bytes_t msg, ct;
      for (int i = 0; i < 300; i++) msg.push_back(8'($urandom));
      request(8'(CMD_ENCRYPT), msg);
      wait (tx_valid);
      request(8'(CMD_ENCRYPT), '{8'h01, 8'h02});
      get_reply(ct);
      expect_eq(ct.size(), 300, "reply of the first request");
      repeat (3000) @(negedge clk);
      expect_eq(rxq.size(), 0, "no reply to the dropped request");
    end

    expect_eq(n_rules, 3, "rule downloads happened");
    expect_eq(n_enc > 0, 1, "encryption happened");
    expect_eq(n_dec > 0, 1, "decryption happened");
    expect_eq(n_drop_frame > 0, 1, "foreign frame dropped");
    expect_eq(n_busy_drop > 0, 1, "request dropped while busy");
    expect_eq(n_tx_stall > 0, 1, "transmit back-pressure");
    expect_eq(n_full_chunk > 0, 1, "full 1 KB chunk");
    expect_eq(n_padded > 0, 1, "short reply padded");
    $display("mechanisms: rules=%0d enc=%0d dec=%0d drop_frame=%0d busy_drop=%0d tx_stall=%0d full_chunk=%0d padded=%0d",
             n_rules, n_enc, n_dec, n_drop_frame, n_busy_drop, n_tx_stall, n_full_chunk, n_padded);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
