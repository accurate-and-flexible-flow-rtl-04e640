// tb_create_update_flows: Process A on a 16-entry flow table with a model of
// the table. Random packets from a small set of flows, with random hash
// addresses per flow so that collisions happen, and some FIN/RST packets;
// checks every immediate export, the event counters, the final table
// contents, the two-cycle packet rate and that an export waits while not
// accepted.
module tb_create_update_flows;
  import flow_pkg::*;
  import tb_util_pkg::*;
  localparam int AW = 4, DEPTH = 16;
  logic clk = 0, rst_n = 0, ready;
  logic in_valid, in_ready;
  pkt_info_t in_info;
  logic [AW-1:0] in_hash;
  logic a_en, a_we, b_en;
  logic [AW-1:0] a_addr, b_addr;
  flow_entry_t a_wdata, a_rdata, b_rdata;
  logic exp_valid, exp_ready;
  flow_rec_t exp_rec;
  logic rd_active, wr_active;
  logic [AW-1:0] rd_addr, wr_addr;
  logic [31:0] n_created, n_updated, n_collisions, n_fin_rst;
  int checks = 0, failures = 0;
  flow_entry_t model [DEPTH];
  flow_rec_t   expq[$];
  always #5 clk = ~clk;

  flow_table #(.DEPTH(DEPTH)) u_tab (.clk, .rst_n, .init_done(ready),
    .a_en, .a_we, .a_addr, .a_wdata, .a_rdata,
    .b_en, .b_we(1'b0), .b_addr, .b_wdata('0), .b_rdata);

  create_update_flows #(.AW(AW)) dut (.clk, .rst_n, .table_ready(ready),
    .in_valid, .in_ready, .in_info, .in_hash, .a_en, .a_we, .a_addr, .a_wdata, .a_rdata,
    .exp_valid, .exp_ready, .exp_rec, .rd_active, .rd_addr, .wr_active, .wr_addr,
    .n_created, .n_updated, .n_collisions, .n_fin_rst);

  initial begin
    #5_000_000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  always @(negedge clk) if (rst_n && exp_valid && exp_ready) begin
    checks++;
    if (expq.size() == 0) begin failures++; $display("unexpected export"); end
    else begin
      flow_rec_t e;
      e = expq.pop_front();
      if (exp_rec !== e) begin failures++; $display("%0t export %h exp %h", $time, exp_rec, e); end
    end
  end

  // model of one packet
  int m_created = 0, m_updated = 0, m_coll = 0, m_fin = 0;
  task automatic model_pkt(pkt_info_t p, logic [AW-1:0] h);
    flow_entry_t  e;
    flow_rec_t    one, upd;
    bit fin;
    e = model[h];
    fin = p.tcp_flags[0] || p.tcp_flags[2];
    one = '{tuple: p.tuple, tcp_flags: p.tcp_flags, first_ts: p.ts, last_ts: p.ts,
            pkts: 1, bytes: 32'(p.bytes)};
    upd = e.rec;
    upd.tcp_flags |= p.tcp_flags; upd.last_ts = p.ts; upd.pkts += 1; upd.bytes += 32'(p.bytes);
    if (fin) m_fin++;
    if (e.busy && e.rec.tuple == p.tuple) begin
      m_updated++;
      if (fin) begin expq.push_back(upd); model[h] = '0; end
      else model[h] = '{busy: 1'b1, rec: upd};
    end else if (e.busy) begin
      m_coll++;
      if (fin) expq.push_back(one);
    end else begin
      if (fin) expq.push_back(one);
      else begin m_created++; model[h] = '{busy: 1'b1, rec: one}; end
    end
  endtask

  task automatic send(pkt_info_t p, logic [AW-1:0] h);
    in_valid = 1; in_info = p; in_hash = h;
    @(negedge clk);
    while (!in_ready) @(negedge clk);
    model_pkt(p, h);
    @(posedge clk); #1;
    in_valid = 0;
  endtask

  initial begin
    five_tuple_t fl [24];
    logic [AW-1:0] fh [24];
    pkt_info_t p;
    int t0, k;
    in_valid = 0; in_info = '0; in_hash = '0; exp_ready = 1; b_en = 0; b_addr = '0;
    for (int i = 0; i < DEPTH; i++) model[i] = '0;
    for (int i = 0; i < 24; i++) begin fl[i] = rand_tuple(i % 3 != 0); fh[i] = AW'($urandom); end
    repeat (2) @(posedge clk); #1 rst_n = 1;
    while (!ready) begin @(posedge clk); #1; end
    fork
      for (int i = 0; i < 1500; i++) begin
        k = $urandom_range(0, 23);
        p.tuple = fl[k]; p.ts = 32'(i * 3); p.bytes = 16'($urandom_range(40, 1500));
        p.tcp_flags = (fl[k].proto == PROTO_TCP) ? 8'($urandom) & 8'h1A : 8'h00;
        if (fl[k].proto == PROTO_TCP && $urandom_range(0, 19) == 0)
          p.tcp_flags |= ($urandom_range(0,1) ? 8'h01 : 8'h04);
        send(p, fh[k]);
      end
      repeat (4000) begin @(posedge clk); #1 exp_ready = $urandom_range(0, 2) != 0; end
    join
    exp_ready = 1;
    repeat (4) @(posedge clk); #1;
    checks++;
    if (n_created != m_created || n_updated != m_updated || n_collisions != m_coll || n_fin_rst != m_fin) begin
      failures++;
      $display("counters c %0d/%0d u %0d/%0d x %0d/%0d f %0d/%0d", n_created, m_created,
               n_updated, m_updated, n_collisions, m_coll, n_fin_rst, m_fin);
    end
    checks++; if (m_coll == 0 || m_fin == 0) begin failures++; $display("no collision or FIN seen"); end
    checks++; if (expq.size() != 0) begin failures++; $display("exports missing %0d", expq.size()); end
    // final table contents through port B
    for (int i = 0; i < DEPTH; i++) begin
      b_en = 1; b_addr = AW'(i);
      @(posedge clk); #1;
      b_en = 0;
      checks++; if (b_rdata !== model[i]) begin failures++; $display("table %0d", i); end
    end
    // rate: 100 non-FIN packets take 200 cycles
    t0 = $time;
    for (int i = 0; i < 100; i++) begin
      k = $urandom_range(0, 23);
      p.tuple = fl[k]; p.ts = 32'(10000 + i); p.bytes = 16'd64; p.tcp_flags = 8'h10;
      send(p, fh[k]);
    end
    checks++;
    if (($time - t0) / 10 > 200) begin failures++; $display("rate %0d cycles", ($time - t0) / 10); end
    $display("created %0d updated %0d collisions %0d fin/rst %0d", m_created, m_updated, m_coll, m_fin);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
