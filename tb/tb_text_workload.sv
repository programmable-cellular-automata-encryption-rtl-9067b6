// tb_text_workload: the text-file workload.  A host model sends an English
// text of TEXT_BYTES characters (generated from a word list) to the full
// system in 1 KB datagrams, encrypts it, sends the ciphertext back for
// decryption and checks that the text returns unchanged.  It also measures
// how the bytes spread over the 256 values: the plaintext stays inside
// printable ASCII, the ciphertext must spread over the whole byte range
// (at least 200 distinct values, at least a third of the bytes outside
// 32..126, and no value more than 4 times its uniform share).
module tb_text_workload;
  import pca_pkg::*;
  import pca_ref_pkg::*;
  import net_ref_pkg::*;

  localparam int TEXT_BYTES = 4000;
  localparam logic [47:0] HOST_MAC  = 48'h02_00_00_00_00_28;
  localparam logic [31:0] HOST_IP   = {8'd192, 8'd168, 8'd0, 8'd40};
  localparam logic [15:0] HOST_PORT = 16'd40001;

  logic clk = 0, rst_n = 0;
  logic rx_valid = 0, rx_last = 0, tx_valid, tx_ready = 1, tx_last;
  logic [7:0] rx_data = 0, tx_data;
  logic idle, drop_frame, busy_drop, fifo_overflow;
  int checks = 0, failures = 0;

  pca_crypto_top dut (.*);
  always #10 clk = ~clk;

  initial begin
    #100ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d (watchdog)", checks, failures);
    $finish;
  end

  bytes_t rxq [$];
  bytes_t cur;
  always @(posedge clk) if (rst_n && tx_valid && tx_ready) begin
    cur.push_back(tx_data);
    if (tx_last) begin rxq.push_back(cur); cur.delete(); end
  end

  task automatic put_frame(input bytes_t f);
    foreach (f[i]) begin
      @(negedge clk); rx_valid = 1; rx_data = f[i]; rx_last = (i == f.size() - 1);
    end
    @(negedge clk); rx_valid = 0; rx_last = 0;
    repeat (12) @(negedge clk);
  endtask

  task automatic request(input byte unsigned cmd, input bytes_t data);
    bytes_t p;
    p.push_back(cmd);
    foreach (data[i]) p.push_back(data[i]);
    put_frame(build_frame(BOARD_MAC, HOST_MAC, HOST_IP, BOARD_IP, HOST_PORT, BOARD_PORT, p));
  endtask

  task automatic get_reply(output bytes_t pl);
    int t = 0;
    bytes_t f;
    while (rxq.size() == 0 && t < 200000) begin @(negedge clk); t++; end
    pl.delete();
    checks++;
    if (rxq.size() == 0) begin failures++; $display("FAIL no reply"); return; end
    f = rxq.pop_front();
    for (int i = 0; i < int'({f[38], f[39]}) - 8; i++) pl.push_back(f[42 + i]);
  endtask

  // process a whole text in 1 KB chunks with one command
  task automatic process(input byte unsigned cmd, input bytes_t in, output bytes_t out);
    bytes_t chunk, r;
    out.delete();
    for (int base = 0; base < in.size(); base += MAX_PAYLOAD) begin
      chunk.delete();
      for (int i = base; i < in.size() && i < base + MAX_PAYLOAD; i++) chunk.push_back(in[i]);
      request(cmd, chunk);
      get_reply(r);
      checks++;
      if (r.size() != chunk.size()) begin failures++; $display("FAIL chunk length %0d", r.size()); end
      foreach (r[i]) out.push_back(r[i]);
      wait (idle);
      repeat (20) @(negedge clk);
    end
  endtask

  string words [16] = '{"the", "cellular", "automata", "encryption", "of", "signal",
                        "processing", "and", "design", "circuits", "for", "network",
                        "systems", "journal", "a", "hardware"};

  initial begin
    bytes_t text, ct, pt, kp;
    int hist [256];
    int distinct = 0, outside = 0, maxc = 0;
    logic [11:0] w;
    logic [7:0] c; logic s;

    // text
    while (text.size() < TEXT_BYTES) begin
      string wd;
      wd = words[$urandom % 16];
      for (int i = 0; i < wd.len(); i++) text.push_back(wd[i]);
      text.push_back(($urandom % 9 == 0) ? 8'h0A : 8'h20);
    end
    while (text.size() > TEXT_BYTES) void'(text.pop_back());

    // key: 64 sets of words whose cycles divide 8
    for (int a = 0; a < 256; a++) begin
      do begin c = 8'($urandom); s = 1'($urandom); end while (!period_divides_8(c, s));
      w = {3'(1 + $urandom % 7), s, c};
      kp.push_back({4'h0, w[11:8]}); kp.push_back(w[7:0]);
    end

    repeat (5) @(negedge clk);
    rst_n = 1;
    repeat (5) @(negedge clk);
    request(8'(CMD_LOAD_RULES), kp);
    wait (idle);

    process(8'(CMD_ENCRYPT), text, ct);
    process(8'(CMD_DECRYPT), ct, pt);

    checks++;
    if (pt.size() != text.size()) begin failures++; $display("FAIL length"); end
    foreach (text[i]) if (i < pt.size() && pt[i] != text[i]) begin
      failures++; $display("FAIL text differs at %0d", i); break;
    end

    foreach (hist[i]) hist[i] = 0;
    foreach (ct[i]) hist[ct[i]]++;
    foreach (hist[i]) begin
      if (hist[i] != 0) distinct++;
      if ((i < 32 || i > 126)) outside += hist[i];
      if (hist[i] > maxc) maxc = hist[i];
    end
    $display("ciphertext: %0d distinct values, %0d of %0d bytes outside printable ASCII, largest count %0d",
             distinct, outside, ct.size(), maxc);
    checks++;
    if (distinct < 200) begin failures++; $display("FAIL too few distinct values"); end
    checks++;
    if (outside * 3 < ct.size()) begin failures++; $display("FAIL ciphertext stays printable"); end
    checks++;
    if (maxc > 4 * (ct.size() / 256 + 1)) begin failures++; $display("FAIL a value dominates"); end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
