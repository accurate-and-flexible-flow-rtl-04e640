// tb_nfqdr_cache: the external-memory flow cache with a behavioural model of
// the three QDR-II modules (read latency 4 cycles). The hash is cut to 8 bits
// (256 codes x 3 slots) and the millisecond to CPM cycles so that sweeps and
// timeouts happen quickly.
// Phase 1: 600 frames at the worst-case spacing of 12 cycles per 64-byte
// frame over 60 flows, among them four flows sharing one hash code (three
// must be kept in slots 0..2, the fourth dropped as a collision) and others
// sharing codes in pairs, with FIN/RST and rejected frames; a model of the
// three-slot table predicts every immediate export in order, and no frame
// may be lost. Phase 2: silence; exactly the model's flows must leave by
// inactivity. Phase 3: four flows that never go idle must be cut by the
// active timeout with their packets and bytes conserved over all records.
// The export stream is randomly stalled throughout.
module tb_nfqdr_cache;
  import flow_pkg::*;
  import qdr_pkg::*;
  import tb_util_pkg::*;
  localparam int CPM = 10, INACT = 2000, ACT = 6000, HW = 8;
  logic clk = 0, rst_n = 0;
  logic [63:0] tdata, m_tdata; logic [7:0] tkeep, m_tkeep;
  logic tvalid, tready, tlast, tuser, m_tvalid, m_tready, m_tlast, ready;
  logic mem_req, mem_rvalid;
  logic [2:0] mem_we;
  logic [HW:0] mem_addr;
  logic [3*QW-1:0] mem_wdata, mem_rdata;
  logic [31:0] now;
  logic [31:0] n_accepted, n_rejected, n_dropped, n_created, n_updated, n_collisions, n_fin_rst,
               n_cache_hits, n_inactive, n_active, n_skipped, n_sweeps, n_exported;
  int checks = 0, failures = 0;
  flow_entry_t model [int];   // key: 4 * hash + slot
  flow_rec_t expA[$], got[$];
  bytes_t cur;
  always #5 clk = ~clk;

  nfqdr_cache #(.HASH_W(HW), .CYCLES_PER_MS(CPM), .INACTIVE_TIMEOUT(INACT), .ACTIVE_TIMEOUT(ACT)) dut (
    .clk, .rst_n, .s_tdata(tdata), .s_tkeep(tkeep), .s_tvalid(tvalid), .s_tready(tready),
    .s_tlast(tlast), .s_tuser(tuser), .m_tdata, .m_tkeep, .m_tvalid, .m_tready, .m_tlast,
    .mem_req, .mem_we, .mem_addr, .mem_wdata, .mem_rvalid, .mem_rdata,
    .now, .ready, .n_accepted, .n_rejected, .n_dropped, .n_created, .n_updated, .n_collisions,
    .n_fin_rst, .n_cache_hits, .n_inactive, .n_active, .n_skipped, .n_sweeps, .n_exported);

  qdr_model #(.AW(HW + 1), .RL(4)) u_mem (
    .clk, .req(mem_req), .we(mem_we), .addr(mem_addr), .wdata(mem_wdata),
    .rvalid(mem_rvalid), .rdata(mem_rdata));

  initial begin
    #30_000_000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  function automatic int h8(five_tuple_t t);
    return int'(hash_ref_w(t, HW, prim_poly(HW)));
  endfunction

  always @(negedge clk) if (rst_n && m_tvalid && m_tready) begin
    for (int l = 0; l < 8; l++) if (m_tkeep[l]) cur.push_back(m_tdata[8*l +: 8]);
    if (m_tlast) begin
      checks++;
      if (cur.size() != 30) begin failures++; $display("record of %0d bytes", cur.size()); end
      got.push_back(rec_from_bytes(cur));
      cur.delete();
    end
  end
  always @(posedge clk) m_tready <= $urandom_range(0, 1);

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

  // three-slot model of one accepted packet
  task automatic model_pkt(pkt_info_t p);
    int h, m, f;
    flow_rec_t one, upd;
    bit fin;
    h = h8(p.tuple);
    for (int s = 0; s < 3; s++) if (!model.exists(4*h + s)) model[4*h + s] = '0;
    fin = p.tcp_flags[TCP_FIN_BIT] || p.tcp_flags[TCP_RST_BIT];
    one = '{tuple: p.tuple, tcp_flags: p.tcp_flags, first_ts: p.ts, last_ts: p.ts,
            pkts: 1, bytes: 32'(p.bytes)};
    m = -1; f = -1;
    for (int s = 2; s >= 0; s--) begin
      if (model[4*h + s].busy && model[4*h + s].rec.tuple == p.tuple) m = s;
      if (!model[4*h + s].busy) f = s;
    end
    if (m >= 0) begin
      upd = model[4*h + m].rec;
      upd.tcp_flags |= p.tcp_flags; upd.last_ts = p.ts; upd.pkts += 1; upd.bytes += 32'(p.bytes);
      if (fin) begin expA.push_back(upd); model[4*h + m] = '0; end
      else model[4*h + m].rec = upd;
    end else if (fin) expA.push_back(one);
    else if (f >= 0) model[4*h + f] = '{busy: 1'b1, rec: one};
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
    five_tuple_t fl [60];
    five_tuple_t f3 [4];
    longint sent_p [4], sent_b [4], got_p [4], got_b [4];
    pkt_info_t p;
    bytes_t f;
    int k, len, n_bad, n_model;
    tvalid = 0; tlast = 0; tuser = 0; tdata = '0; tkeep = '0;
    for (int i = 0; i < 60; i++) fl[i] = rand_tuple(i % 4 != 3);
    // flows 1, 2 and 3 share flow 0's hash code; 5 shares 4's, 9 shares 8's
    for (int j = 1; j < 4; j++) do fl[j] = rand_tuple(1); while (h8(fl[j]) != h8(fl[0]));
    do fl[5] = rand_tuple(1); while (h8(fl[5]) != h8(fl[4]));
    do fl[9] = rand_tuple(0); while (h8(fl[9]) != h8(fl[8]));
    repeat (2) @(posedge clk); #1 rst_n = 1;
    while (!ready) begin @(posedge clk); #1; end
    checks++;
    // the memory is cleared first: 2^HW identity writes
    // ---- phase 1: flows 0..3 first, in order, without FIN
    for (int j = 0; j < 4; j++) begin
      p.tuple = fl[j]; p.tcp_flags = 8'h02; p.bytes = 16'd46; p.ts = now;
      model_pkt(p);
      send_frame(build_frame(p.tuple, p.tcp_flags, 46), 0, 4);
    end
    n_bad = 0;
    for (int i = 0; i < 600; i++) begin
      int kind;
      kind = $urandom_range(0, 19);
      k = (i % 3 == 0) ? $urandom_range(0, 9) : $urandom_range(0, 59);
      p.tuple = fl[k];
      p.tcp_flags = (fl[k].proto == PROTO_TCP) ? 8'h10 | (8'($urandom) & 8'h0A) : 8'h00;
      if (fl[k].proto == PROTO_TCP && kind == 0) p.tcp_flags |= 8'h01;
      if (fl[k].proto == PROTO_TCP && kind == 1) p.tcp_flags |= 8'h04;
      len = (kind < 14) ? 46 : $urandom_range(46, 400);
      p.bytes = 16'(len);
      p.ts = now;
      f = build_frame(p.tuple, p.tcp_flags, len, (kind == 19) ? 16'h86DD : 16'h0800);
      if (kind >= 18) n_bad++;
      else model_pkt(p);
      send_frame(f, kind == 18, 4);
    end
    repeat (50) begin @(posedge clk); #1; end
    checks++;
    if (n_dropped != 0 || n_rejected != n_bad || n_accepted != 604 - n_bad) begin
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
    checks++; if (n_collisions == 0 || n_cache_hits == 0) begin
      failures++; $display("collisions %0d cache hits %0d", n_collisions, n_cache_hits);
    end
    got.delete();

    // ---- phase 2
    wait_ms(INACT);
    wait_sweeps(2);
    repeat (200) begin @(posedge clk); #1; end
    n_model = 0;
    foreach (model[key]) if (model[key].busy) begin
      bit found;
      n_model++;
      found = 0;
      foreach (got[i]) if (got[i] == model[key].rec) found = 1;
      checks++; if (!found) begin failures++; $display("flow at %0d/%0d not exported", key / 4, key % 4); end
    end
    checks++;
    if (got.size() != n_model || n_inactive != 32'(n_model)) begin
      failures++; $display("phase 2: %0d exports, %0d flows, n_inactive %0d", got.size(), n_model, n_inactive);
    end
    got.delete();

    // ---- phase 3
    for (int j = 0; j < 4; j++) begin
      f3[j] = rand_tuple(j % 2 == 0);
      sent_p[j] = 0; sent_b[j] = 0; got_p[j] = 0; got_b[j] = 0;
    end
    for (int r = 0; r < 40; r++) begin
      for (int j = 0; j < 4; j++) begin
        len = $urandom_range(46, 1000);
        sent_p[j]++; sent_b[j] += len;
        send_frame(build_frame(f3[j], 8'h10, len), 0, $urandom_range(4, 8));
      end
      wait_ms(400);
    end
    wait_ms(INACT);
    wait_sweeps(2);
    repeat (200) begin @(posedge clk); #1; end
    foreach (got[i]) for (int j = 0; j < 4; j++) if (got[i].tuple == f3[j]) begin
      got_p[j] += got[i].pkts; got_b[j] += got[i].bytes;
    end
    for (int j = 0; j < 4; j++) begin
      checks++;
      if (got_p[j] != sent_p[j] || got_b[j] != sent_b[j]) begin
        failures++; $display("flow %0d: %0d/%0d packets %0d/%0d bytes", j, got_p[j], sent_p[j], got_b[j], sent_b[j]);
      end
    end
    checks++; if (n_active < 4) begin failures++; $display("n_active %0d", n_active); end
    checks++; if (n_exported != n_fin_rst + n_inactive + n_active) begin failures++; $display("export count"); end
    $display("accepted %0d created %0d updated %0d cache hits %0d collisions %0d fin/rst %0d inactive %0d active %0d skipped %0d",
             n_accepted, n_created, n_updated, n_cache_hits, n_collisions, n_fin_rst, n_inactive, n_active, n_skipped);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
