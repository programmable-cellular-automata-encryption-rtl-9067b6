// tb_udp_tx: has the transmitter send frames of random length (including
// short ones that need padding) from a memory model, with random MAC
// back-pressure, and checks every header field, the IPv4 header checksum,
// the payload, the padding, the frame length and tx_last.
module tb_udp_tx;
  import pca_pkg::*;
  import net_ref_pkg::*;
  logic clk = 0, rst_n = 0, start = 0, tx_valid, tx_ready = 1, tx_last, busy;
  logic [47:0] dst_mac = 0; logic [31:0] dst_ip = 0; logic [15:0] dst_port = 0;
  logic [10:0] len = 0;
  logic [9:0] mem_raddr; logic [7:0] mem_rdata, tx_data;
  logic [7:0] mem [1024];
  int checks = 0, failures = 0;
  byte unsigned f [$];

  udp_tx dut (.*);
  assign mem_rdata = mem[mem_raddr];
  always #5 clk = ~clk;

  initial begin
    #20000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  task automatic expect_eq(input int got, input int exp, input string what);
    checks++;
    if (got != exp) begin failures++; $display("FAIL %s: %0h vs %0h", what, got, exp); end
  endtask

  initial begin
    bytes_t ip;
    repeat (2) @(negedge clk); rst_n = 1;
    for (int n = 0; n < 40; n++) begin
      int l, flen;
      l = (n % 4 == 0) ? $urandom % 19 : 1 + $urandom % 1024;
      flen = (l + 42 < 60) ? 60 : l + 42;
      foreach (mem[i]) mem[i] = 8'($urandom);
      dst_mac = {16'($urandom), 32'($urandom)}; dst_ip = 32'($urandom); dst_port = 16'($urandom);
      len = 11'(l);
      @(negedge clk); start = 1; @(negedge clk); start = 0;
      f.delete();
      fork
        while (1) begin
          @(negedge clk); tx_ready = ($urandom % 4) != 0;
        end
        begin
          do begin
            @(posedge clk);
            if (tx_valid && tx_ready) begin
              f.push_back(tx_data);
              if (tx_last != (f.size() == flen)) begin failures++; $display("FAIL tx_last at %0d", f.size()); end
            end
          end while (!(tx_valid && tx_ready && tx_last) && f.size() < 2000);
        end
      join_any
      disable fork;
      tx_ready = 1;
      expect_eq(f.size(), flen, "frame length");
      for (int i = 0; i < 6; i++) expect_eq(f[i], dst_mac[8*(5-i) +: 8], "dst mac");
      for (int i = 0; i < 6; i++) expect_eq(f[6+i], BOARD_MAC[8*(5-i) +: 8], "src mac");
      expect_eq({f[12], f[13]}, 16'h0800, "ethertype");
      expect_eq(f[14], 8'h45, "ver/ihl");
      expect_eq({f[16], f[17]}, l + 28, "ip total length");
      expect_eq(f[23], 8'h11, "protocol");
      ip.delete(); for (int i = 14; i < 34; i++) ip.push_back(f[i]);
      expect_eq(ip_checksum(ip), 0, "ip header checksum");
      expect_eq({f[26], f[27], f[28], f[29]}, BOARD_IP, "src ip");
      expect_eq({f[30], f[31], f[32], f[33]}, dst_ip, "dst ip");
      expect_eq({f[34], f[35]}, BOARD_PORT, "src port");
      expect_eq({f[36], f[37]}, dst_port, "dst port");
      expect_eq({f[38], f[39]}, l + 8, "udp length");
      for (int i = 0; i < l; i++) if (f[42+i] != mem[i]) begin
        failures++; $display("FAIL payload byte %0d", i); break;
      end
      checks++;
      for (int i = 42 + l; i < flen; i++) expect_eq(f[i], 0, "padding");
      @(negedge clk);
      expect_eq(busy, 0, "busy after frame");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
