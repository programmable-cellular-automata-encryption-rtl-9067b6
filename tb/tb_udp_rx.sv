// tb_udp_rx: sends frames to the UDP receiver and checks that exactly the
// payload of frames addressed to the board comes out, with first/last marks
// and the sender's addresses, while frames for another MAC, IP, port,
// protocol or EtherType are dropped (drop pulse, no payload).  Short payloads
// check that Ethernet padding is not passed on.
module tb_udp_rx;
  import pca_pkg::*;
  import net_ref_pkg::*;
  logic clk = 0, rst_n = 0, rx_valid = 0, rx_last = 0;
  logic [7:0] rx_data = 0;
  logic pl_valid, pl_first, pl_last, drop;
  logic [7:0] pl_data;
  logic [47:0] src_mac; logic [31:0] src_ip; logic [15:0] src_port;
  int checks = 0, failures = 0, drops = 0;
  byte unsigned got [$];
  int firsts = 0, lasts = 0;

  udp_rx dut (.*);
  always #5 clk = ~clk;

  initial begin
    #5000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  always @(posedge clk) if (rst_n) begin
    if (pl_valid) begin
      got.push_back(pl_data);
      if (pl_first) firsts++;
      if (pl_last) lasts++;
      if (pl_first != (got.size() == 1)) begin failures++; $display("FAIL first mark"); end
    end
    if (drop) drops++;
  end

  task automatic send(input bytes_t f, input bit gaps);
    foreach (f[i]) begin
      @(negedge clk);
      if (gaps) while (($urandom % 3) == 0) begin rx_valid = 0; @(negedge clk); end
      rx_valid = 1; rx_data = f[i]; rx_last = (i == f.size() - 1);
    end
    @(negedge clk); rx_valid = 0; rx_last = 0;
    repeat (3) @(negedge clk);
  endtask

  initial begin
    bytes_t pl, f;
    logic [47:0] hmac = 48'h0A_0B_0C_0D_0E_0F;
    logic [31:0] hip = {8'd192, 8'd168, 8'd0, 8'd40};
    repeat (2) @(negedge clk); rst_n = 1;
    for (int n = 0; n < 60; n++) begin
      int len, kind;
      logic [15:0] sport;
      len = (n % 5 == 0) ? 1 + $urandom % 17 : 1 + $urandom % 1025;
      kind = $urandom % 8;   // 0..2 good, others spoiled
      sport = 16'($urandom);
      pl.delete();
      for (int i = 0; i < len; i++) pl.push_back(8'($urandom));
      f = build_frame((kind == 1) ? 48'hFFFF_FFFF_FFFF : BOARD_MAC, hmac, hip, BOARD_IP, sport, BOARD_PORT, pl);
      case (kind)
        3: f[0] = f[0] ^ 8'h01;        // other MAC
        4: f[33] = f[33] ^ 8'h01;      // other IP
        5: f[37] = f[37] ^ 8'h01;      // other port
        6: f[23] = 8'h06;              // TCP
        7: f[12] = 8'h86;              // not IPv4
        default: ;
      endcase
      got.delete(); firsts = 0; lasts = 0; drops = 0;
      send(f, n % 2);
      checks++;
      if (kind < 3) begin
        if (got.size() != len || firsts != 1 || lasts != 1 || drops != 0) begin
          failures++; $display("FAIL good frame %0d: %0d of %0d bytes, f%0d l%0d d%0d", n, got.size(), len, firsts, lasts, drops);
        end else begin
          foreach (pl[i]) if (got[i] != pl[i]) begin failures++; $display("FAIL byte %0d", i); break; end
          checks++;
          if (src_mac !== hmac || src_ip !== hip || src_port !== sport) begin
            failures++; $display("FAIL source fields");
          end
        end
      end else if (got.size() != 0 || drops != 1) begin
        failures++; $display("FAIL spoiled frame %0d kind %0d passed %0d bytes", n, kind, got.size());
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
