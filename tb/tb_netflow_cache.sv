// tb_netflow_cache: the flow cache at its full 16,384-entry table, with the
// millisecond shortened to CPM cycles and the timeouts to INACT/ACT ms.
// Phase 1: 600 frames (TCP/UDP flows, some sharing a hash address, some
// FIN/RST, some ARP/ICMP/bad-FCS frames) at the worst-case spacing of 12
// cycles per 64-byte frame; a flow-level model predicts every immediate
// export in order and the table contents, and no frame may be lost.
// Phase 2: silence; exactly the model's flows must leave by inactivity.
// Phase 3: four flows that never go idle; they must be cut by the active
// timeout and their packet and byte counts, summed over all their exported
// records, must equal what was sent. The export stream is randomly stalled.
module tb_netflow_cache;
  import flow_pkg::*;
  import tb_util_pkg::*;
  localparam int CPM = 10, INACT = 3000, ACT = 20000, DEPTH = 16384;
  logic clk = 0, rst_n = 0;
  logic [63:0] tdata, m_tdata; logic [7:0] tkeep, m_tkeep;
  logic tvalid, tready, tlast, tuser, m_tvalid, m_tready, m_tlast, ready;
  logic [31:0] now;
  logic [31:0] n_accepted, n_rejected, n_dropped, n_created, n_updated, n_collisions, n_fin_rst,
               n_inactive, n_active, n_skipped, n_sweeps, n_exported;
  int checks = 0, failures = 0;
  flow_entry_t model [int];
  flow_rec_t expA[$], got[$];
  bytes_t cur;
  bit stall_en = 1;
  always #5 clk = ~clk;

  netflow_cache #(.CYCLES_PER_MS(CPM), .INACTIVE_TIMEOUT(INACT), .ACTIVE_TIMEOUT(ACT)) dut (
    .clk, .rst_n, .s_tdata(tdata), .s_tkeep(tkeep), .s_tvalid(tvalid), .s_tready(tready),
    .s_tlast(tlast), .s_tuser(tuser), .m_tdata, .m_tkeep, .m_tvalid, .m_tready, .m_tlast,
    .now, .ready, .n_accepted, .n_rejected, .n_dropped, .n_created, .n_updated, .n_collisions,
    .n_fin_rst, .n_inactive, .n_active, .n_skipped, .n_sweeps, .n_exported);

  initial begin
    #30_000_000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  always @(negedge clk) if (rst_n && m_tvalid && m_tready) begin
    for (int l = 0; l < 8; l++) if (m_tkeep[l]) cur.push_back(m_tdata[8*l +: 8]);
    if (m_tlast) begin
      checks++;
      if (cur.size() != 30) begin failures++; $display("record of %0d bytes", cur.size()); end
      got.push_back(rec_from_bytes(cur));
      cur.delete();
    end
  end
  always @(posedge clk) if (stall_en) m_tready <= $urandom_range(0, 1); else m_tready <= 1;

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

  // flow-level model of one accepted packet
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
      if (fin) begin expA.push_back(upd); model.delete(h); end
      else model[h] = '{busy: 1'b1, rec: upd};
    end else if (e.busy) begin
      if (fin) expA.push_back(one);
    end else if (fin) expA.push_back(one);
    else model[h] = '{busy: 1'b1, rec: one};
  endtask

  task automatic wait_ms(int ms);
    logic [31:0] t;
    t = now;
    while (now - t < ms) begin @(posedge clk); #1; end
  endtask

  task automatic wait_sweeps(int n);
    logic [31:0] s;
    s = n_sweeps;
    while (n_sweeps - s < n) begin @(posedge clk); #1; end
  endtask

  initial begin
    five_tuple_t fl [40];
    five_tuple_t f3 [4];
    longint sent_p [4], sent_b [4], got_p [4], got_b [4];
    pkt_info_t p;
    bytes_t f;
    int k, len, n_bad, n_coll_pairs, nf;
    tvalid = 0; tlast = 0; tuser = 0; tdata = '0; tkeep = '0;
    for (int i = 0; i < 40; i++) fl[i] = rand_tuple(i % 4 != 3);
    // make flows 1, 2 and 3 share a hash address with flows 0, 4 and 8
    n_coll_pairs = 0;
    for (int j = 0; j < 3; j++) begin
      five_tuple_t t;
      logic [13:0] target;
      target = hash_ref(fl[4*j]);
      do begin t = rand_tuple(1); end while (hash_ref(t) != target);
      fl[j + 1] = t;
      n_coll_pairs++;
    end
    repeat (2) @(posedge clk); #1 rst_n = 1;
    while (!ready) begin @(posedge clk); #1; end

    // ---- phase 1
    n_bad = 0;
    for (int i = 0; i < 600; i++) begin
      int kind;
      kind = $urandom_range(0, 19);
      k = $urandom_range(0, 39);
      p.tuple = fl[k];
      p.tcp_flags = (fl[k].proto == PROTO_TCP) ? 8'h10 | (8'($urandom) & 8'h0A) : 8'h00;
      if (fl[k].proto == PROTO_TCP && kind == 0) p.tcp_flags |= 8'h01;
      if (fl[k].proto == PROTO_TCP && kind == 1) p.tcp_flags |= 8'h04;
      len = (kind < 14) ? 46 : $urandom_range(46, 400);
      p.bytes = 16'(len);
      p.ts = now;
      if (kind == 19) begin
        f = build_frame(p.tuple, p.tcp_flags, len, 16'h86DD); n_bad++;
        send_frame(f, 0, 4);
      end else if (kind == 18) begin
        f = build_frame(p.tuple, p.tcp_flags, len); n_bad++;
        send_frame(f, 1, 4);
      end else begin
        f = build_frame(p.tuple, p.tcp_flags, len);
        model_pkt(p);
        send_frame(f, 0, 4);
      end
    end
    repeat (50) begin @(posedge clk); #1; end
    checks++;
    if (n_dropped != 0 || n_rejected != n_bad || n_accepted != 600 - n_bad) begin
      failures++; $display("accepted %0d rejected %0d dropped %0d", n_accepted, n_rejected, n_dropped);
    end
    while (got.size() < expA.size()) begin @(posedge clk); #1; end
    repeat (20) begin @(posedge clk); #1; end
    checks++;
    if (got.size() != expA.size()) begin failures++; $display("phase 1: %0d exports, %0d expected", got.size(), expA.size()); end
    foreach (expA[i]) begin
      checks++;
      if (i >= got.size() || got[i] !== expA[i]) begin failures++; $display("FIN/RST export %0d differs", i); end
    end
    checks++; if (n_collisions == 0 || expA.size() == 0) begin failures++; $display("no collision / FIN seen"); end
    got.delete();

    // ---- phase 2: everything left expires by inactivity
    wait_ms(INACT);
    wait_sweeps(2);
    repeat (200) begin @(posedge clk); #1; end
    checks++;
    if (got.size() != model.num()) begin failures++; $display("phase 2: %0d exports, %0d flows", got.size(), model.num()); end
    foreach (model[h]) begin
      bit found;
      found = 0;
      foreach (got[i]) if (got[i] == model[h].rec) found = 1;
      checks++; if (!found) begin failures++; $display("flow at %0d not exported", h); end
    end
    checks++; if (n_inactive != 32'(model.num())) begin failures++; $display("n_inactive %0d", n_inactive); end
    got.delete();
    model.delete();

    // ---- phase 3: long-lived flows, cut by the active timeout
    for (int j = 0; j < 4; j++) begin
      bit clash;
      do begin
        f3[j] = rand_tuple(j % 2 == 0);
        clash = 0;
        for (int m = 0; m < j; m++) if (hash_ref(f3[m]) == hash_ref(f3[j])) clash = 1;
      end while (clash);
      sent_p[j] = 0; sent_b[j] = 0; got_p[j] = 0; got_b[j] = 0;
    end
    for (int r = 0; r < 50; r++) begin
      for (int j = 0; j < 4; j++) begin
        len = $urandom_range(46, 1000);
        f = build_frame(f3[j], 8'h10, len);
        sent_p[j]++; sent_b[j] += len;
        send_frame(f, 0, 4);
      end
      wait_ms(500);
    end
    wait_ms(INACT);
    wait_sweeps(2);
    repeat (200) begin @(posedge clk); #1; end
    foreach (got[i]) for (int j = 0; j < 4; j++) if (got[i].tuple == f3[j]) begin
      got_p[j] += got[i].pkts; got_b[j] += got[i].bytes;
      checks++;
      // the sweep visits each entry every 2*DEPTH cycles, so a record may
      // run past ACT by up to one sweep period
      if (got[i].last_ts - got[i].first_ts > ACT + 2*DEPTH/CPM + 1) begin failures++; $display("record longer than the active timeout"); end
    end
    for (int j = 0; j < 4; j++) begin
      checks++;
      if (got_p[j] != sent_p[j] || got_b[j] != sent_b[j]) begin
        failures++; $display("flow %0d: %0d/%0d packets %0d/%0d bytes", j, got_p[j], sent_p[j], got_b[j], sent_b[j]);
      end
    end
    checks++; if (n_active < 4) begin failures++; $display("n_active %0d", n_active); end
    $display("accepted %0d created %0d updated %0d collisions %0d fin/rst %0d inactive %0d active %0d skipped %0d exported %0d",
             n_accepted, n_created, n_updated, n_collisions, n_fin_rst, n_inactive, n_active, n_skipped, n_exported);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
