// tb_net_pkg: testbench helpers for building and checking Ethernet frames.
//
// Frames are byte queues without preamble and FCS. The functions here build
// ARP requests, TCP segments and UDP datagrams as a PC-side peer would send
// them, compute the Ethernet CRC-32 and the Internet checksum, and read header
// fields. They are written independently of the RTL (byte-serial, from the
// protocol definitions) so that testbenches can check the RTL against them.
package tb_net_pkg;

  typedef byte unsigned bytes_t[$];

  class eth_frame;
    byte unsigned b[$];
    time          t_start;     // simulation time of the SFD
    bit           fcs_ok;
  endclass

  function automatic int unsigned crc32(input bytes_t d);
    int unsigned c = 32'hFFFF_FFFF;
    foreach (d[i]) begin
      c = c ^ 32'(d[i]);
      for (int k = 0; k < 8; k++) c = (c & 1) ? ((c >> 1) ^ 32'hEDB8_8320) : (c >> 1);
    end
    return ~c;
  endfunction

  // one's complement sum of bytes [from, from+len) as 16-bit big-endian words
  function automatic int unsigned osum(input bytes_t d, input int from, input int len);
    int unsigned s = 0;
    for (int i = 0; i < len; i += 2) begin
      s += {d[from+i], (i + 1 < len) ? d[from+i+1] : 8'h00};
    end
    while (s >> 16) s = (s & 32'hFFFF) + (s >> 16);
    return s;
  endfunction

  function automatic int unsigned get16(input bytes_t d, input int at);
    return {d[at], d[at+1]};
  endfunction

  function automatic int unsigned get32(input bytes_t d, input int at);
    return {d[at], d[at+1], d[at+2], d[at+3]};
  endfunction

  function automatic void put16(ref bytes_t d, input int unsigned v);
    d.push_back(v[15:8]); d.push_back(v[7:0]);
  endfunction

  function automatic void put32(ref bytes_t d, input int unsigned v);
    d.push_back(v[31:24]); d.push_back(v[23:16]); d.push_back(v[15:8]); d.push_back(v[7:0]);
  endfunction

  function automatic void put48(ref bytes_t d, input longint unsigned v);
    for (int i = 5; i >= 0; i--) d.push_back(8'(v >> (8*i)));
  endfunction

  function automatic bytes_t arp_request(input longint unsigned sha, input int unsigned spa,
                                         input int unsigned tpa);
    bytes_t d;
    put48(d, 48'hFFFF_FFFF_FFFF); put48(d, sha); put16(d, 16'h0806);
    put16(d, 1); put16(d, 16'h0800); d.push_back(6); d.push_back(4); put16(d, 1);
    put48(d, sha); put32(d, spa); put48(d, 0); put32(d, tpa);
    return d;
  endfunction

  // IPv4 header (20 bytes) with a correct checksum, appended to d
  function automatic void put_ipv4(ref bytes_t d, input int unsigned total_len,
                                   input int unsigned proto, input int unsigned src,
                                   input int unsigned dst);
    int at = d.size();
    int unsigned s;
    d.push_back(8'h45); d.push_back(0); put16(d, total_len); put16(d, 16'h1234);
    put16(d, 16'h4000); d.push_back(64); d.push_back(8'(proto)); put16(d, 0);
    put32(d, src); put32(d, dst);
    s = osum(d, at, 20);
    d[at+10] = 8'(~s >> 8);
    d[at+11] = 8'(~s);
  endfunction

  function automatic bytes_t tcp_segment(input longint unsigned smac, input longint unsigned dmac,
                                         input int unsigned sip, input int unsigned dip,
                                         input int unsigned sport, input int unsigned dport,
                                         input int unsigned seq, input int unsigned ack,
                                         input int unsigned flags, input bytes_t pl);
    bytes_t d, ph;
    int unsigned s;
    int at;
    put48(d, dmac); put48(d, smac); put16(d, 16'h0800);
    put_ipv4(d, 40 + pl.size(), 6, sip, dip);
    at = d.size();
    put16(d, sport); put16(d, dport); put32(d, seq); put32(d, ack);
    put16(d, (5 << 12) | flags); put16(d, 16'hFFFF); put16(d, 0); put16(d, 0);
    foreach (pl[i]) d.push_back(pl[i]);
    put32(ph, sip); put32(ph, dip); put16(ph, 6); put16(ph, 20 + pl.size());
    s = osum(ph, 0, 12) + osum(d, at, 20 + pl.size());
    while (s >> 16) s = (s & 32'hFFFF) + (s >> 16);
    d[at+16] = 8'(~s >> 8);
    d[at+17] = 8'(~s);
    return d;
  endfunction

  function automatic bytes_t udp_datagram(input longint unsigned smac, input longint unsigned dmac,
                                          input int unsigned sip, input int unsigned dip,
                                          input int unsigned sport, input int unsigned dport,
                                          input bytes_t pl);
    bytes_t d;
    put48(d, dmac); put48(d, smac); put16(d, 16'h0800);
    put_ipv4(d, 28 + pl.size(), 17, sip, dip);
    put16(d, sport); put16(d, dport); put16(d, 8 + pl.size()); put16(d, 0);
    foreach (pl[i]) d.push_back(pl[i]);
    return d;
  endfunction

  // true if the IPv4 header at byte 14 has a correct checksum
  function automatic bit ipv4_ok(input bytes_t d);
    return osum(d, 14, 20) == 16'hFFFF;
  endfunction

  // true if the TCP checksum of an IPv4/TCP frame is correct
  function automatic bit tcp_ok(input bytes_t d);
    bytes_t ph;
    int unsigned s, tl;
    tl = get16(d, 16) - 20;
    for (int i = 26; i < 34; i++) ph.push_back(d[i]);
    put16(ph, 6); put16(ph, tl);
    s = osum(ph, 0, 12) + osum(d, 34, tl);
    while (s >> 16) s = (s & 32'hFFFF) + (s >> 16);
    return s == 16'hFFFF;
  endfunction

endpackage
