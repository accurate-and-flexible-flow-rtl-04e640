// tb_util_pkg: reference models and stimulus helpers shared by the
// testbenches. The models are written independently of the RTL: the hash is
// a long division over a bit vector, checksums are summed byte by byte,
// frames are built as byte queues.
package tb_util_pkg;
  import flow_pkg::*;

  typedef byte unsigned bytes_t[$];

  // Remainder of t(x) * x^14 divided by x^14 + x^5 + x^3 + x + 1.
  function automatic logic [13:0] hash_ref(logic [103:0] t);
    logic [117:0] v;
    logic [14:0]  p;
    v = {t, 14'd0};
    p = 15'b100_0000_0010_1011;
    for (int i = 117; i >= 14; i--)
      if (v[i]) v[i -: 15] = v[i -: 15] ^ p;
    return v[13:0];
  endfunction

  // The same for a degree-w polynomial given by its low-order terms.
  function automatic logic [19:0] hash_ref_w(logic [103:0] t, int w, logic [31:0] low);
    logic [123:0] v;
    logic [20:0]  p;
    v = '0;
    v[123 -: 104] = t;
    v = v >> (20 - w);
    p = 21'(low) | (21'd1 << w);
    for (int i = 103 + w; i >= w; i--)
      if (v[i]) v = v ^ (124'(p) << (i - w));
    return 20'(v & ((124'd1 << w) - 1));
  endfunction

  function automatic five_tuple_t rand_tuple(bit tcp);
    five_tuple_t t;
    t.src_ip   = $urandom;
    t.dst_ip   = $urandom;
    t.src_port = 16'($urandom);
    t.dst_port = 16'($urandom);
    t.proto    = tcp ? PROTO_TCP : PROTO_UDP;
    return t;
  endfunction

  // Ethernet II + IPv4 + TCP/UDP frame without FCS, padded to 60 bytes.
  // ip_len is written into the IPv4 Total Length field.
  function automatic bytes_t build_frame(five_tuple_t t, logic [7:0] flags,
                                         int ip_len, logic [15:0] ethertype = 16'h0800,
                                         int ihl = 5, int min_len = 60);
    bytes_t f;
    int l4, len;
    for (int i = 0; i < 6; i++) f.push_back(8'hAA);
    for (int i = 0; i < 6; i++) f.push_back(8'h10 + i);
    f.push_back(ethertype[15:8]); f.push_back(ethertype[7:0]);
    f.push_back({4'd4, 4'(ihl)}); f.push_back(8'h00);
    f.push_back(8'(ip_len >> 8)); f.push_back(8'(ip_len));
    f.push_back(8'h12); f.push_back(8'h34); f.push_back(8'h40); f.push_back(8'h00);
    f.push_back(8'd64); f.push_back(t.proto); f.push_back(8'h00); f.push_back(8'h00);
    for (int i = 3; i >= 0; i--) f.push_back(t.src_ip[8*i +: 8]);
    for (int i = 3; i >= 0; i--) f.push_back(t.dst_ip[8*i +: 8]);
    for (int i = 0; i < 4 * (ihl - 5); i++) f.push_back(8'h01);
    l4 = f.size();
    f.push_back(t.src_port[15:8]); f.push_back(t.src_port[7:0]);
    f.push_back(t.dst_port[15:8]); f.push_back(t.dst_port[7:0]);
    if (t.proto == PROTO_TCP) begin
      for (int i = 0; i < 8; i++) f.push_back(8'h00);   // seq, ack
      f.push_back(8'h50); f.push_back(flags);
      for (int i = 0; i < 6; i++) f.push_back(8'h00);
    end else begin
      f.push_back(8'h00); f.push_back(8'h08); f.push_back(8'h00); f.push_back(8'h00);
    end
    len = (min_len > f.size()) ? min_len : f.size();
    while (f.size() < len) f.push_back(8'h00);
    return f;
  endfunction

  // One's-complement Internet checksum over bytes [from, to).
  function automatic logic [15:0] inet_csum(bytes_t b, int from, int to, logic [31:0] init = 0);
    logic [31:0] s;
    s = init;
    for (int i = from; i < to; i += 2)
      s += {b[i], (i + 1 < to) ? b[i+1] : 8'h00};
    while (s[31:16] != 0) s = s[15:0] + s[31:16];
    return ~s[15:0];
  endfunction

  // Record as the 30 bytes the flow cache sends.
  function automatic bytes_t rec_bytes(flow_rec_t r);
    bytes_t b;
    logic [239:0] v;
    v = r;
    for (int k = 0; k < 30; k++) b.push_back(v[239 - 8*k -: 8]);
    return b;
  endfunction

  function automatic flow_rec_t rec_from_bytes(bytes_t b, int off = 0);
    logic [239:0] v;
    for (int k = 0; k < 30; k++) v[239 - 8*k -: 8] = b[off + k];
    return flow_rec_t'(v);
  endfunction

  function automatic logic [31:0] be32(bytes_t b, int off);
    return {b[off], b[off+1], b[off+2], b[off+3]};
  endfunction
  function automatic logic [15:0] be16(bytes_t b, int off);
    return {b[off], b[off+1]};
  endfunction

  // 48-byte NetFlow v5 flow record for a flow cache record.
  function automatic bytes_t nf5_pdu(flow_rec_t r);
    bytes_t b;
    for (int k = 0; k < 48; k++) b.push_back(8'h00);
    for (int k = 0; k < 4; k++) begin
      b[k]      = r.tuple.src_ip[31-8*k -: 8];
      b[4 + k]  = r.tuple.dst_ip[31-8*k -: 8];
      b[16 + k] = r.pkts[31-8*k -: 8];
      b[20 + k] = r.bytes[31-8*k -: 8];
      b[24 + k] = r.first_ts[31-8*k -: 8];
      b[28 + k] = r.last_ts[31-8*k -: 8];
    end
    b[32] = r.tuple.src_port[15:8]; b[33] = r.tuple.src_port[7:0];
    b[34] = r.tuple.dst_port[15:8]; b[35] = r.tuple.dst_port[7:0];
    b[37] = r.tcp_flags; b[38] = r.tuple.proto;
    return b;
  endfunction

  // Flow record carried by the 48-byte NetFlow v5 PDU at b[off].
  function automatic flow_rec_t pdu_rec(bytes_t b, int off);
    flow_rec_t r;
    r.tuple.src_ip = be32(b, off); r.tuple.dst_ip = be32(b, off + 4);
    r.pkts = be32(b, off + 16); r.bytes = be32(b, off + 20);
    r.first_ts = be32(b, off + 24); r.last_ts = be32(b, off + 28);
    r.tuple.src_port = be16(b, off + 32); r.tuple.dst_port = be16(b, off + 34);
    r.tcp_flags = b[off + 37]; r.tuple.proto = b[off + 38];
    return r;
  endfunction

  function automatic void put32(ref bytes_t b, input logic [31:0] v);
    for (int i = 3; i >= 0; i--) b.push_back(v[8*i +: 8]);
  endfunction
  function automatic void put16(ref bytes_t b, input logic [15:0] v);
    b.push_back(v[15:8]); b.push_back(v[7:0]);
  endfunction

  // Complete NetFlow v5 Ethernet frame, as the export engine builds it with
  // its default addresses and ports.
  function automatic bytes_t nf5_frame(flow_rec_t recs[$], logic [31:0] uptime,
      logic [31:0] secs, logic [31:0] nsecs, logic [31:0] seq, logic [15:0] ip_id,
      logic [47:0] dmac = 48'h0002_0000_0002, logic [47:0] smac = 48'h0002_0000_0001,
      logic [31:0] sip = 32'hC0A8_0001, logic [31:0] dip = 32'hC0A8_0002,
      logic [15:0] sport = 16'd2055, logic [15:0] dport = 16'd2055);
    bytes_t f, pl, ph;
    logic [15:0] ulen, ck;
    // NetFlow v5 payload
    put16(pl, 16'd5); put16(pl, 16'(recs.size()));
    put32(pl, uptime); put32(pl, secs); put32(pl, nsecs); put32(pl, seq);
    pl.push_back(8'd0); pl.push_back(8'd0); put16(pl, 16'd0);
    foreach (recs[i]) begin
      bytes_t d;
      d = nf5_pdu(recs[i]);
      foreach (d[k]) pl.push_back(d[k]);
    end
    ulen = 16'(8 + pl.size());
    // UDP checksum over pseudo-header, header and payload
    put32(ph, sip); put32(ph, dip); put16(ph, 16'd17); put16(ph, ulen);
    put16(ph, sport); put16(ph, dport); put16(ph, ulen); put16(ph, 16'd0);
    foreach (pl[k]) ph.push_back(pl[k]);
    ck = inet_csum(ph, 0, ph.size());
    if (ck == 0) ck = 16'hFFFF;
    for (int i = 5; i >= 0; i--) f.push_back(dmac[8*i +: 8]);
    for (int i = 5; i >= 0; i--) f.push_back(smac[8*i +: 8]);
    put16(f, 16'h0800);
    put16(f, 16'h4500); put16(f, 16'(20) + ulen); put16(f, ip_id); put16(f, 16'h4000);
    f.push_back(8'd64); f.push_back(8'd17); put16(f, 16'h0000); put32(f, sip); put32(f, dip);
    begin
      logic [15:0] ick;
      ick = inet_csum(f, 14, 34);
      f[24] = ick[15:8]; f[25] = ick[7:0];
    end
    put16(f, sport); put16(f, dport); put16(f, ulen); put16(f, ck);
    foreach (pl[k]) f.push_back(pl[k]);
    return f;
  endfunction
endpackage
