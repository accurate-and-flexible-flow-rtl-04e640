// tb_netflow_top: the whole monitor end to end, from frames on the receive
// port to NetFlow v5 datagrams on the transmit port. Full 16,384-entry
// table; the millisecond is shortened to CPM cycles, the timeouts to INACT
// and ACT ms and the export wait to WAIT ms.
// Every datagram is rebuilt from the PDUs it carries with an independent
// reference (Ethernet, IPv4 and UDP headers and checksums, NetFlow v5 header,
// flow sequence, IP identification) and must match byte for byte; every PDU
// must match a record predicted by a flow-level model of the cache.
// Phases: (1) mixed traffic with shared hash addresses, FIN/RST and frames
// that must be rejected; (2) silence, so every flow leaves by inactivity;
// (3) one flow of 64-byte frames, 12 to 16 cycles apart, for five times
// the active timeout, so the sweep meets the update process on
// the same entry and the flow is cut by the active timeout; then one late
// packet is timed to meet the sweep on the expired entry; (4) the
// transmit port held off while FIN frames of new flows keep arriving, so
// the queues fill and frames are lost at the parser.
// In parallel the external-memory cache on port 2 (2^8 hash codes, behavioural
// memory) gets four flows on one hash code, so three are kept and the fourth
// is dropped; a repeat packet is served from the internal cache; one FIN
// export happens; and two flows leave by inactivity. Exact counter values and
// the number of exported records are checked.
// Each mechanism is counted and one that never happened is a failure.
module tb_netflow_top;
  import flow_pkg::*;
  import tb_util_pkg::*;
  localparam int CPM = 10, INACT = 3000, ACT = 8000, WAIT = 2000, N = 30, DEPTH = 16384;
  logic clk = 0, rst_n = 0;
  logic [63:0] tdata, tx_tdata; logic [7:0] tkeep, tx_tkeep;
  logic tvalid, tready, tlast, tuser, tx_tvalid, tx_tready, tx_tlast, ready;
  logic [31:0] now;
  logic [31:0] stat [13];
  int checks = 0, failures = 0;
  flow_entry_t model [int];
  flow_rec_t expect_q[$];
  bytes_t cur;
  int n_rx = 0, flows_rx = 0, full_frames = 0, timed_frames = 0, unmatched = 0;
  longint stall_cycles = 0;
  bit tx_mode = 1;          // 1: random stalls, 0: held off
  bit track = 1;            // match PDUs against expect_q
  five_tuple_t hot;         // phase-3 flow, checked by conservation instead
  longint hot_p = 0, hot_b = 0, hot_gp = 0, hot_gb = 0, hot_recs = 0;
  always #5 clk = ~clk;
  // external-memory cache side: 2^8 hash codes, behavioural memory
  localparam int QHW = 8;
  logic [63:0] q_tdata, q_m_tdata; logic [7:0] q_tkeep, q_m_tkeep;
  logic q_tvalid = 0, q_tready, q_tlast = 0, q_tuser = 0, q_m_tvalid, q_m_tready, q_m_tlast, q_ready;
  logic q_mem_req, q_mem_rvalid; logic [2:0] q_mem_we; logic [QHW:0] q_mem_addr;
  logic [3*qdr_pkg::QW-1:0] q_mem_wdata, q_mem_rdata;
  logic [31:0] q_stat [13];
  int q_recs = 0; bit q_done = 0;
  five_tuple_t qf [4];

  netflow_top #(.CYCLES_PER_MS(CPM), .INACTIVE_TIMEOUT(INACT), .ACTIVE_TIMEOUT(ACT),
                .N_FLOWS(N), .WAIT_MS(WAIT), .QDR_HASH_W(QHW)) dut (
    .clk, .rst_n, .rx_tdata(tdata), .rx_tkeep(tkeep), .rx_tvalid(tvalid), .rx_tready(tready),
    .rx_tlast(tlast), .rx_tuser(tuser), .tx_tdata, .tx_tkeep, .tx_tvalid, .tx_tready, .tx_tlast,
    .ready, .now, .stat,
    .q_rx_tdata(q_tdata), .q_rx_tkeep(q_tkeep), .q_rx_tvalid(q_tvalid), .q_rx_tready(q_tready),
    .q_rx_tlast(q_tlast), .q_rx_tuser(q_tuser),
    .q_m_tdata, .q_m_tkeep, .q_m_tvalid, .q_m_tready, .q_m_tlast,
    .q_mem_req, .q_mem_we, .q_mem_addr, .q_mem_wdata, .q_mem_rvalid, .q_mem_rdata,
    .q_ready, .q_stat);
  qdr_model #(.AW(QHW + 1), .RL(4)) u_qmem (
    .clk, .req(q_mem_req), .we(q_mem_we), .addr(q_mem_addr), .wdata(q_mem_wdata),
    .rvalid(q_mem_rvalid), .rdata(q_mem_rdata));
  always @(posedge clk) q_m_tready <= $urandom_range(0, 1);
  always @(negedge clk) if (rst_n && q_m_tvalid && q_m_tready && q_m_tlast) q_recs++;

  task automatic q_send(five_tuple_t t, logic [7:0] flags);
    bytes_t f;
    int nb;
    f = build_frame(t, flags, 46);
    nb = (f.size() + 7) / 8;
    for (int b = 0; b < nb; b++) begin
      q_tvalid = 1; q_tlast = (b == nb - 1);
      for (int l = 0; l < 8; l++) begin
        q_tkeep[l] = (8*b + l < f.size());
        q_tdata[8*l +: 8] = q_tkeep[l] ? f[8*b + l] : 8'h00;
      end
      @(posedge clk); #1;
    end
    q_tvalid = 0; q_tlast = 0;
    repeat (4) begin @(posedge clk); #1; end
  endtask

  // External-memory cache: four flows on one hash code (three kept, the
  // fourth dropped), a repeat packet served from the internal cache, a FIN
  // export, and the two remaining flows left to the inactive timeout.
  initial begin
    q_tdata = '0; q_tkeep = '0;
    qf[0] = rand_tuple(1);
    for (int j = 1; j < 4; j++)
      do qf[j] = rand_tuple(1);
      while (hash_ref_w(qf[j], QHW, prim_poly(QHW)) != hash_ref_w(qf[0], QHW, prim_poly(QHW)));
    wait (q_ready === 1'b1);
    @(posedge clk); #1;
    q_send(qf[0], 8'h02);
    q_send(qf[0], 8'h10);
    for (int j = 1; j < 4; j++) q_send(qf[j], 8'h10);
    q_send(qf[0], 8'h11);
    repeat ((INACT + 200) * CPM) @(posedge clk);
    q_done = 1;
  end

  initial begin
    #40_000_000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  always @(posedge clk) tx_tready <= tx_mode ? ($urandom_range(0, 3) != 0) : 1'b0;
  always @(negedge clk) if (rst_n && tx_tvalid && !tx_tready) stall_cycles++;
  always @(negedge clk) if (rst_n && tx_tvalid && tx_tready) begin
    for (int l = 0; l < 8; l++) if (tx_tkeep[l]) cur.push_back(tx_tdata[8*l +: 8]);
    if (tx_tlast) check_frame();
  end

  task automatic check_frame();
    int cnt;
    flow_rec_t recs[$];
    bytes_t ref_f;
    cnt = (cur.size() - 66) / 48;
    checks++;
    if (cur.size() < 66 + 48 || cnt > N || cur.size() != 66 + 48 * cnt || be16(cur, 44) != 16'(cnt)) begin
      failures++; $display("frame %0d: %0d bytes", n_rx, cur.size());
    end else begin
      for (int i = 0; i < cnt; i++) recs.push_back(pdu_rec(cur, 66 + 48 * i));
      ref_f = nf5_frame(recs, be32(cur, 46), be32(cur, 50), be32(cur, 54), 32'(flows_rx), 16'(n_rx));
      checks++;
      if (cur != ref_f) begin failures++; $display("frame %0d differs from the reference", n_rx); end
      foreach (recs[i]) begin
        if (recs[i].tuple == hot) begin
          hot_gp += recs[i].pkts; hot_gb += recs[i].bytes; hot_recs++;
        end else if (track) begin
          int idx;
          idx = -1;
          foreach (expect_q[j]) if (idx < 0 && expect_q[j] == recs[i]) idx = j;
          checks++;
          if (idx < 0) begin failures++; unmatched++; $display("unexpected PDU in frame %0d", n_rx); end
          else expect_q.delete(idx);
        end
      end
      if (cnt == N) full_frames++; else timed_frames++;
      flows_rx += cnt;
    end
    n_rx++;
    cur.delete();
  endtask

  task automatic send_frame(bytes_t f, bit bad_fcs, int gap);
    int nb;
    nb = (f.size() + 7) / 8;
    for (int b = 0; b < nb; b++) begin
      tvalid = 1; tlast = (b == nb - 1); tuser = bad_fcs && tlast;
      for (int l = 0; l < 8; l++) begin
        tkeep[l] = (8*b + l < f.size());
        tdata[8*l +: 8] = tkeep[l] ? f[8*b + l] : 8'h00;
      end
      @(posedge clk); #1;
    end
    tvalid = 0; tlast = 0; tuser = 0;
    repeat (gap) begin @(posedge clk); #1; end
  endtask

  task automatic model_pkt(pkt_info_t p);
    int h;
    flow_entry_t e;
    flow_rec_t one, upd;
    bit fin;
    h = int'(hash_ref(p.tuple));
    e = model.exists(h) ? model[h] : '0;
    fin = p.tcp_flags[TCP_FIN_BIT] || p.tcp_flags[TCP_RST_BIT];
    one = '{tuple: p.tuple, tcp_flags: p.tcp_flags, first_ts: p.ts, last_ts: p.ts,
            pkts: 1, bytes: 32'(p.bytes)};
    upd = e.rec;
    upd.tcp_flags |= p.tcp_flags; upd.last_ts = p.ts; upd.pkts += 1; upd.bytes += 32'(p.bytes);
    if (e.busy && e.rec.tuple == p.tuple) begin
      if (fin) begin expect_q.push_back(upd); model.delete(h); end
      else model[h] = '{busy: 1'b1, rec: upd};
    end else if (fin) expect_q.push_back(one);
    else if (!e.busy) model[h] = '{busy: 1'b1, rec: one};
  endtask

  task automatic wait_ms(int ms);
    logic [31:0] t;
    t = now;
    while (now - t < ms) begin @(posedge clk); #1; end
  endtask

  task automatic wait_sweeps(int n);
    logic [31:0] s;
    s = stat[10];
    while (stat[10] - s < n) begin @(posedge clk); #1; end
  endtask

  task automatic mech(string name, longint n);
    checks++;
    if (n <= 0) begin failures++; $display("mechanism never happened: %s", name); end
    else $display("  %-34s %0d", name, n);
  endtask

  initial begin
    five_tuple_t fl [40];
    pkt_info_t p;
    bytes_t f;
    int k, len, n_bad;
    logic [31:0] drop0, t0;
    tvalid = 0; tlast = 0; tuser = 0; tdata = '0; tkeep = '0;
    for (int i = 0; i < 40; i++) fl[i] = rand_tuple(i % 4 != 3);
    for (int j = 0; j < 2; j++) begin
      five_tuple_t t;
      logic [13:0] target;
      target = hash_ref(fl[4*j]);
      do begin t = rand_tuple(1); end while (hash_ref(t) != target);
      fl[4*j + 1] = t;
    end
    hot = rand_tuple(0);
    repeat (2) @(posedge clk); #1 rst_n = 1;
    while (!ready) begin @(posedge clk); #1; end

    // ---- phase 1: mixed traffic
    n_bad = 0;
    for (int i = 0; i < 300; i++) begin
      int kind;
      kind = $urandom_range(0, 19);
      k = $urandom_range(0, 39);
      p.tuple = fl[k];
      p.tcp_flags = (fl[k].proto == PROTO_TCP) ? 8'h10 | (8'($urandom) & 8'h0A) : 8'h00;
      if (fl[k].proto == PROTO_TCP && kind == 0) p.tcp_flags |= 8'h01;
      if (fl[k].proto == PROTO_TCP && kind == 1) p.tcp_flags |= 8'h04;
      len = (kind < 12) ? 46 : $urandom_range(46, 1400);
      p.bytes = 16'(len);
      p.ts = now;
      f = build_frame(p.tuple, p.tcp_flags, len, (kind == 19) ? 16'h0806 : 16'h0800);
      if (kind >= 18) n_bad++;
      else model_pkt(p);
      send_frame(f, kind == 18, 4);
    end
    foreach (model[h]) expect_q.push_back(model[h].rec);
    // ---- phase 2: silence until every flow has left by inactivity and the
    // last partial datagram has been sent
    wait_ms(INACT);
    wait_sweeps(2);
    wait_ms(WAIT + 100);
    checks++;
    if (expect_q.size() != 0 || model.num() != int'(stat[7])) begin
      failures++; $display("phase 2: %0d records missing, %0d flows / %0d inactive", expect_q.size(), model.num(), stat[7]);
    end
    checks++;
    if (stat[0] != 32'(300 - n_bad) || stat[1] != 32'(n_bad) || stat[2] != 0) begin
      failures++; $display("accepted %0d rejected %0d dropped %0d", stat[0], stat[1], stat[2]);
    end

    // ---- phase 3: one flow near the worst-case rate for longer than ACT
    // The gap varies so that the update process meets the sweep at every
    // phase of its two-cycle visit; 40 s is about twelve sweeps.
    t0 = now;
    while (now - t0 < 40_000) begin
      len = 46;
      f = build_frame(hot, 8'h00, len);
      hot_p++; hot_b += len;
      send_frame(f, 0, $urandom_range(4, 8));
    end
    // Let the flow go idle, then send one more packet timed against the
    // sweep pointer (watched through the hierarchy) so that the update
    // lands while the sweep is evaluating the expired entry; the sweep must
    // then skip it rather than export it. The lead varies until it happens.
    for (int d = 2; d < 14 && stat[9] == 0; d++) begin
      logic [13:0] x;
      x = hash_ref(hot);
      wait_ms(INACT + 10);
      while (dut.u_cache.u_proc_b.ptr != x - 14'(d) || dut.u_cache.u_proc_b.state != 1'b0) begin
        @(posedge clk); #1;
      end
      f = build_frame(hot, 8'h00, 46);
      hot_p++; hot_b += 46;
      send_frame(f, 0, 4);
    end
    wait_ms(INACT);
    wait_sweeps(2);
    wait_ms(WAIT + 100);
    checks++;
    if (hot_gp != hot_p || hot_gb != hot_b || stat[2] != 0) begin
      failures++; $display("phase 3: %0d/%0d packets %0d/%0d bytes", hot_gp, hot_p, hot_gb, hot_b);
    end

    // ---- phase 4: transmit held off, FIN frames of new flows keep coming
    track = 0;
    tx_mode = 0;
    drop0 = stat[2];
    for (int i = 0; i < 600; i++) begin
      f = build_frame(rand_tuple(1), 8'h11, 46);
      send_frame(f, 0, 4);
    end
    tx_mode = 1;
    wait_ms(2 * WAIT + 100);
    checks++;
    if (32'(flows_rx) != stat[11] || stat[11] != stat[6] + stat[7] + stat[8] || 32'(n_rx) != stat[12]) begin
      failures++; $display("exported %0d, sent in datagrams %0d, frames %0d/%0d", stat[11], flows_rx, n_rx, stat[12]);
    end

    $display("mechanisms:");
    mech("flow created", stat[3]);
    mech("flow updated", stat[4]);
    mech("collision, packet discarded", stat[5]);
    mech("FIN/RST immediate export", stat[6]);
    mech("inactive timeout export", stat[7]);
    mech("active timeout export", stat[8]);
    mech("sweep entry skipped (A/B clash)", stat[9]);
    mech("frame rejected (non-IPv4, bad FCS)", stat[1]);
    mech("frame dropped on overflow", stat[2] - drop0);
    mech("full datagram of 30 PDUs", full_frames);
    mech("datagram closed by the wait timer", timed_frames);
    mech("transmit back-pressure cycles", stall_cycles);
    mech("QDR cache: flow created", q_stat[3]);
    mech("QDR cache: internal-cache hit", q_stat[7]);
    mech("QDR cache: level-3 collision drop", q_stat[5]);
    mech("QDR cache: FIN/RST export", q_stat[6]);
    mech("QDR cache: inactive timeout export", q_stat[8]);
    checks++;
    if (!q_done || q_stat[3] != 3 || q_stat[4] != 2 || q_stat[5] != 1 || q_stat[7] != 2 ||
        q_stat[6] != 1 || q_stat[8] != 2 || q_recs != 3) begin
      failures++;
      $display("QDR cache: done %0d created %0d updated %0d collisions %0d hits %0d fin %0d inactive %0d records %0d",
               q_done, q_stat[3], q_stat[4], q_stat[5], q_stat[7], q_stat[6], q_stat[8], q_recs);
    end
    $display("datagrams %0d, PDUs %0d, hot flow in %0d records", n_rx, flows_rx, hot_recs);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
