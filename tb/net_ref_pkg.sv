// net_ref_pkg: builds and parses Ethernet II / IPv4 / UDP frames for the
// testbenches (standard header layouts, frames without preamble and FCS).
package net_ref_pkg;

  typedef byte unsigned bytes_t[$];

  function automatic logic [15:0] ip_checksum(input bytes_t h);
    int unsigned sum = 0;
    for (int i = 0; i < h.size(); i += 2) sum += {h[i], h[i+1]};
    while (sum >> 16) sum = (sum & 32'hFFFF) + (sum >> 16);
    return ~16'(sum);
  endfunction

  function automatic bytes_t build_frame(input logic [47:0] dmac, input logic [47:0] smac,
                                         input logic [31:0] sip, input logic [31:0] dip,
                                         input logic [15:0] sport, input logic [15:0] dport,
                                         input bytes_t payload);
    bytes_t f, ip;
    logic [15:0] tl, ul, cs;
    tl = 16'(28 + payload.size());
    ul = 16'(8 + payload.size());
    for (int i = 5; i >= 0; i--) f.push_back(dmac[8*i +: 8]);
    for (int i = 5; i >= 0; i--) f.push_back(smac[8*i +: 8]);
    f.push_back(8'h08); f.push_back(8'h00);
    ip = '{8'h45, 8'h00, tl[15:8], tl[7:0], 8'h12, 8'h34, 8'h00, 8'h00, 8'd128, 8'h11, 8'h00, 8'h00,
           sip[31:24], sip[23:16], sip[15:8], sip[7:0], dip[31:24], dip[23:16], dip[15:8], dip[7:0]};
    cs = ip_checksum(ip);
    ip[10] = cs[15:8]; ip[11] = cs[7:0];
    foreach (ip[i]) f.push_back(ip[i]);
    f.push_back(sport[15:8]); f.push_back(sport[7:0]);
    f.push_back(dport[15:8]); f.push_back(dport[7:0]);
    f.push_back(ul[15:8]); f.push_back(ul[7:0]);
    f.push_back(8'h00); f.push_back(8'h00);
    foreach (payload[i]) f.push_back(payload[i]);
    while (f.size() < 60) f.push_back(8'h00);
    return f;
  endfunction

endpackage
