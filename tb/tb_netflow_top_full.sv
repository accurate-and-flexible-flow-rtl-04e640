// tb_netflow_top_full: the monitor at its real sizes and timing (16,384-entry
// table, 200 MHz millisecond, 15 s / 30 min timeouts, 30 PDUs per datagram,
// one-minute wait), with no parameter changed. Thirty TCP flows at distinct
// table addresses each send two packets and then a FIN; the FIN exports each
// flow at once, and the thirtieth record completes a NetFlow v5 datagram,
// which must leave without waiting for the timer and must match, byte for
// byte, a reference datagram built from the flows in FIN order.
// The external-memory cache beside it runs at its full 2^18 hash codes
// (786,432 flow slots in a behavioural memory): it must clear the whole table
// after reset, then take one TCP flow of three packets ending in FIN and
// export exactly one record equal to the predicted one.
module tb_netflow_top_full;
  import flow_pkg::*;
  import tb_util_pkg::*;
  logic clk = 0, rst_n = 0;
  logic [63:0] tdata, tx_tdata; logic [7:0] tkeep, tx_tkeep;
  logic tvalid, tready, tlast, tuser, tx_tvalid, tx_tready, tx_tlast, ready;
  logic [31:0] now;
  logic [31:0] stat [13];
  int checks = 0, failures = 0, n_rx = 0;
  flow_rec_t recs[$];
  bytes_t cur, got;
  longint cyc = 0, t_last_fin = 0, t_tx_first = -1;
  logic [63:0] q_tdata, q_m_tdata; logic [7:0] q_tkeep, q_m_tkeep;
  logic q_tvalid = 0, q_tready, q_tlast = 0, q_m_tvalid, q_m_tlast, q_ready;
  logic q_mem_req, q_mem_rvalid; logic [2:0] q_mem_we; logic [18:0] q_mem_addr;
  logic [3*qdr_pkg::QW-1:0] q_mem_wdata, q_mem_rdata;
  logic [31:0] q_stat [13];
  bytes_t q_cur;
  flow_rec_t q_got[$];
  always #2.5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  netflow_top dut (
    .clk, .rst_n, .rx_tdata(tdata), .rx_tkeep(tkeep), .rx_tvalid(tvalid), .rx_tready(tready),
    .rx_tlast(tlast), .rx_tuser(tuser), .tx_tdata, .tx_tkeep, .tx_tvalid, .tx_tready, .tx_tlast,
    .ready, .now, .stat,
    .q_rx_tdata(q_tdata), .q_rx_tkeep(q_tkeep), .q_rx_tvalid(q_tvalid), .q_rx_tready(q_tready),
    .q_rx_tlast(q_tlast), .q_rx_tuser(1'b0),
    .q_m_tdata, .q_m_tkeep, .q_m_tvalid, .q_m_tready(1'b1), .q_m_tlast,
    .q_mem_req, .q_mem_we, .q_mem_addr, .q_mem_wdata, .q_mem_rvalid, .q_mem_rdata,
    .q_ready, .q_stat);
  qdr_model #(.AW(19), .RL(4)) u_qmem (
    .clk, .req(q_mem_req), .we(q_mem_we), .addr(q_mem_addr), .wdata(q_mem_wdata),
    .rvalid(q_mem_rvalid), .rdata(q_mem_rdata));
  always @(negedge clk) if (rst_n && q_m_tvalid) begin
    for (int l = 0; l < 8; l++) if (q_m_tkeep[l]) q_cur.push_back(q_m_tdata[8*l +: 8]);
    if (q_m_tlast) begin q_got.push_back(rec_from_bytes(q_cur)); q_cur.delete(); end
  end

  task automatic q_send(bytes_t f);
    int nb;
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

  initial begin
    #5_000_000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  assign tx_tready = 1'b1;
  always @(negedge clk) if (rst_n && tx_tvalid && tx_tready) begin
    if (cur.size() == 0 && n_rx == 0) t_tx_first = cyc;
    for (int l = 0; l < 8; l++) if (tx_tkeep[l]) cur.push_back(tx_tdata[8*l +: 8]);
    if (tx_tlast) begin got = cur; cur.delete(); n_rx++; end
  end

  task automatic send_frame(bytes_t f);
    int nb;
    nb = (f.size() + 7) / 8;
    for (int b = 0; b < nb; b++) begin
      tvalid = 1; tlast = (b == nb - 1);
      for (int l = 0; l < 8; l++) begin
        tkeep[l] = (8*b + l < f.size());
        tdata[8*l +: 8] = tkeep[l] ? f[8*b + l] : 8'h00;
      end
      @(posedge clk); #1;
    end
    tvalid = 0; tlast = 0;
    repeat (4) begin @(posedge clk); #1; end
  endtask

  initial begin
    five_tuple_t fl [30];
    bytes_t ref_f;
    int len;
    tvalid = 0; tlast = 0; tuser = 0; tdata = '0; tkeep = '0;
    for (int i = 0; i < 30; i++) begin
      bit clash;
      do begin
        fl[i] = rand_tuple(1);
        clash = 0;
        for (int m = 0; m < i; m++) if (hash_ref(fl[m]) == hash_ref(fl[i])) clash = 1;
      end while (clash);
      recs.push_back('{tuple: fl[i], tcp_flags: 8'h00, first_ts: '0, last_ts: '0, pkts: 0, bytes: 0});
    end
    repeat (2) @(posedge clk); #1 rst_n = 1;
    while (!ready) begin @(posedge clk); #1; end
    for (int r = 0; r < 3; r++)
      for (int i = 0; i < 30; i++) begin
        logic [7:0] fl_flags;
        fl_flags = (r == 2) ? 8'h11 : (r == 0 ? 8'h02 : 8'h10);
        len = $urandom_range(46, 1500);
        if (r == 0) recs[i].first_ts = now;
        recs[i].last_ts = now;
        recs[i].tcp_flags |= fl_flags;
        recs[i].pkts++; recs[i].bytes += len;
        send_frame(build_frame(fl[i], fl_flags, len));
      end
    t_last_fin = cyc;
    while (n_rx == 0 && cyc - t_last_fin < 5000) begin @(posedge clk); #1; end
    repeat (10) begin @(posedge clk); #1; end
    checks++;
    if (n_rx != 1) begin failures++; $display("%0d datagrams", n_rx); end
    else begin
      ref_f = nf5_frame(recs, be32(got, 46), be32(got, 50), be32(got, 54), 32'd0, 16'd0);
      checks++;
      if (got != ref_f) begin
        failures++; $display("datagram of %0d bytes differs from the reference (%0d bytes)", got.size(), ref_f.size());
      end
      checks++;
      if (got.size() != 1506) begin failures++; $display("datagram length %0d", got.size()); end
      $display("datagram of %0d bytes, 30 PDUs, began %0d cycles after the last FIN frame",
               got.size(), t_tx_first - t_last_fin);
    end
    checks++;
    if (stat[3] != 30 || stat[6] != 30 || stat[4] != 60 || stat[0] != 90) begin
      failures++; $display("created %0d updated %0d fin %0d", stat[3], stat[4], stat[6]);
    end
    // external-memory cache: one flow, three packets, FIN exports it
    begin
      flow_rec_t qe;
      five_tuple_t qt;
      q_tdata = '0; q_tkeep = '0;
      while (!q_ready) begin @(posedge clk); #1; end
      checks++;
      if (cyc < 262_144) begin failures++; $display("QDR table ready after %0d cycles", cyc); end
      qt = rand_tuple(1);
      qe = '{tuple: qt, tcp_flags: 8'h00, first_ts: now, last_ts: '0, pkts: 0, bytes: 0};
      for (int r = 0; r < 3; r++) begin
        logic [7:0] fl_flags;
        fl_flags = (r == 2) ? 8'h11 : (r == 0 ? 8'h02 : 8'h10);
        len = $urandom_range(46, 1500);
        qe.last_ts = now; qe.tcp_flags |= fl_flags; qe.pkts++; qe.bytes += len;
        q_send(build_frame(qt, fl_flags, len));
      end
      repeat (50) begin @(posedge clk); #1; end
      checks++;
      if (q_got.size() != 1 || q_got[0] != qe || q_stat[3] != 1 || q_stat[6] != 1) begin
        failures++; $display("QDR cache: %0d records, created %0d fin %0d", q_got.size(), q_stat[3], q_stat[6]);
      end else $display("QDR cache: table of 786,432 slots cleared, flow record exported as predicted");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
