// tb_netflow_export: the NetFlow v5 export engine end to end (N = 30,
// one-minute wait scaled to WAIT_MS ms of CYCLES_PER_MS cycles). Random flow
// records are sent in bursts of 30, 45 and 3 while the output is randomly
// stalled; every frame sent is compared byte for byte with a reference frame
// built from the same records (Ethernet, IPv4 with checksum, UDP with
// checksum over the pseudo-header, NetFlow v5 header with flow sequence).
// Time fields are taken from the frame and checked for consistency. Partial
// batches must leave only after the wait has elapsed, full ones at once.
module tb_netflow_export;
  import flow_pkg::*;
  import tb_util_pkg::*;
  localparam int CPM = 20, WAIT = 5, N = 30;
  logic clk = 0, rst_n = 0;
  logic [63:0] s_tdata, m_tdata; logic [7:0] s_tkeep, m_tkeep;
  logic s_tvalid, s_tready, s_tlast, m_tvalid, m_tready, m_tlast;
  logic [31:0] n_frames;
  int checks = 0, failures = 0;
  flow_rec_t sent[$];
  longint sent_t[$];
  bytes_t cur;
  int n_rx = 0, flows_rx = 0, full_frames = 0, timed_frames = 0;
  longint cyc = 0;
  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  netflow_export #(.N_FLOWS(N), .WAIT_MS(WAIT), .CYCLES_PER_MS(CPM)) dut (
    .clk, .rst_n, .s_tdata, .s_tkeep, .s_tvalid, .s_tready, .s_tlast,
    .m_tdata, .m_tkeep, .m_tvalid, .m_tready, .m_tlast, .n_frames);

  initial begin
    #20_000_000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  always @(negedge clk) if (rst_n && m_tvalid && m_tready) begin
    for (int l = 0; l < 8; l++) if (m_tkeep[l]) cur.push_back(m_tdata[8*l +: 8]);
    if (m_tlast) check_frame();
  end

  task automatic check_frame();
    int cnt;
    flow_rec_t recs[$];
    bytes_t ref_f;
    logic [31:0] up, secs, nsecs;
    checks++;
    cnt = (cur.size() - 66) / 48;
    up = be32(cur, 46); secs = be32(cur, 50); nsecs = be32(cur, 54);
    for (int i = 0; i < cnt && sent.size() > 0; i++) recs.push_back(sent.pop_front());
    ref_f = nf5_frame(recs, up, secs, nsecs, 32'(flows_rx), 16'(n_rx));
    if (cnt < 1 || cnt > N || cur.size() != 66 + 48 * cnt || cur != ref_f) begin
      failures++;
      $display("frame %0d: %0d bytes, %0d flows", n_rx, cur.size(), cnt);
      foreach (cur[k]) if (k < ref_f.size() && cur[k] != ref_f[k]) begin
        $display("  byte %0d got %h exp %h", k, cur[k], ref_f[k]); break;
      end
    end
    checks++;
    if (secs != up / 1000 || nsecs != (up % 1000) * 1_000_000 || 64'(up) > cyc / CPM) begin
      failures++; $display("time fields %0d %0d %0d", up, secs, nsecs);
    end
    // partial batches wait for WAIT ms after their first record
    if (cnt < N) begin
      timed_frames++;
      checks++;
      if (cyc - sent_t[0] < longint'(WAIT * CPM)) begin failures++; $display("partial batch sent early"); end
    end else full_frames++;
    for (int i = 0; i < cnt; i++) void'(sent_t.pop_front());
    flows_rx += cnt;
    n_rx++;
    cur.delete();
  endtask

  function automatic flow_rec_t rnd_rec();
    logic [255:0] v;
    for (int i = 0; i < 8; i++) v[32*i +: 32] = $urandom;
    return flow_rec_t'(v[REC_W-1:0]);
  endfunction

  task automatic send_rec(flow_rec_t r);
    bytes_t b;
    b = rec_bytes(r);
    for (int beat = 0; beat < 4; beat++) begin
      s_tvalid = 1; s_tlast = (beat == 3);
      for (int l = 0; l < 8; l++) begin
        s_tkeep[l] = (8*beat + l < 30);
        s_tdata[8*l +: 8] = s_tkeep[l] ? b[8*beat + l] : 8'h00;
      end
      @(negedge clk);
      while (!s_tready) @(negedge clk);
      if (beat == 0) begin sent.push_back(r); sent_t.push_back(cyc); end
      @(posedge clk); #1;
    end
    s_tvalid = 0; s_tlast = 0;
  endtask

  initial begin
    s_tvalid = 0; s_tlast = 0; s_tdata = '0; s_tkeep = '0; m_tready = 1;
    repeat (2) @(posedge clk); #1 rst_n = 1;
    fork
      begin
        repeat (30) send_rec(rnd_rec());
        repeat (45) send_rec(rnd_rec());
        repeat (WAIT * CPM * 2) @(posedge clk);
        #1;
        repeat (3) send_rec(rnd_rec());
        repeat (WAIT * CPM * 2) @(posedge clk);
        #1;
      end
      forever begin @(posedge clk); #1 m_tready = $urandom_range(0, 3) != 0; end
    join_any
    m_tready = 1;
    repeat (500) @(posedge clk);
    checks++; if (sent.size() != 0 || n_rx != 4 || n_frames != 4) begin
      failures++; $display("left %0d frames %0d/%0d", sent.size(), n_rx, n_frames);
    end
    checks++; if (full_frames != 2 || timed_frames != 2) begin
      failures++; $display("full %0d timed %0d", full_frames, timed_frames);
    end
    $display("frames %0d flows %0d", n_rx, flows_rx);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
