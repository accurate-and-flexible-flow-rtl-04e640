// tb_export_module: two export modules, one per output format (plain
// 30-byte records; one Ethernet frame per record), fed identical random
// records from the Process A and Process B ports with random back-pressure
// on the stream. Each received packet is reassembled from its beats and
// compared with the records in acceptance order; lengths, tkeep, the
// Ethernet header and padding are checked, as is A's priority over B and
// the FIFO filling up (in_ready low) while the stream is stalled.
module tb_export_module;
  import flow_pkg::*;
  import tb_util_pkg::*;
  logic clk = 0, rst_n = 0;
  logic a_valid, b_valid, m_tready;
  flow_rec_t a_rec, b_rec;
  logic a_ready [2], b_ready [2];
  logic [63:0] m_tdata [2]; logic [7:0] m_tkeep [2]; logic m_tvalid [2], m_tlast [2];
  logic [31:0] n_exp [2];
  int checks = 0, failures = 0, full_seen = 0, prio_seen = 0;
  flow_rec_t q [2][$];
  bytes_t cur [2];
  always #5 clk = ~clk;

  for (genvar g = 0; g < 2; g++) begin : g_dut
    export_module #(.NETFLOW_EXPORT_PRESENT(g == 0), .FIFO_DEPTH(8)) dut (
      .clk, .rst_n, .a_valid, .a_ready(a_ready[g]), .a_rec, .b_valid, .b_ready(b_ready[g]), .b_rec,
      .m_tdata(m_tdata[g]), .m_tkeep(m_tkeep[g]), .m_tvalid(m_tvalid[g]), .m_tready,
      .m_tlast(m_tlast[g]), .n_exported(n_exp[g]));

    always @(negedge clk) if (rst_n) begin
      if (a_valid && a_ready[g]) q[g].push_back(a_rec);
      else if (b_valid && b_ready[g]) q[g].push_back(b_rec);
      if (m_tvalid[g] && m_tready) begin
        for (int l = 0; l < 8; l++) if (m_tkeep[g][l]) cur[g].push_back(m_tdata[g][8*l +: 8]);
        if (m_tlast[g]) check_pkt(g);
      end
    end
  end

  task automatic check_pkt(int g);
    flow_rec_t e, r;
    checks++;
    e = q[g].pop_front();
    if (g == 0) begin
      r = rec_from_bytes(cur[g], 0);
      if (cur[g].size() != 30 || r !== e) begin failures++; $display("plain: %0d bytes", cur[g].size()); end
    end else begin
      bit bad;
      r = rec_from_bytes(cur[g], 14);
      bad = cur[g].size() != 60 || r !== e || be16(cur[g], 12) != 16'h88B5 || cur[g][0] != 8'hFF;
      for (int k = 44; k < cur[g].size(); k++) if (cur[g][k] != 0) bad = 1;
      if (bad) begin failures++; $display("frame: %0d bytes", cur[g].size()); end
    end
    cur[g].delete();
  endtask

  initial begin
    #5_000_000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  function automatic flow_rec_t rnd_rec();
    logic [255:0] v;
    for (int i = 0; i < 8; i++) v[32*i +: 32] = $urandom;
    return flow_rec_t'(v[REC_W-1:0]);
  endfunction

  initial begin
    a_valid = 0; b_valid = 0; a_rec = '0; b_rec = '0; m_tready = 1;
    repeat (2) @(posedge clk); #1 rst_n = 1;
    for (int i = 0; i < 3000; i++) begin
      // the two DUTs share their inputs: a request is held until both have
      // taken it, so the faster one may take it twice (its model sees both)
      if (!a_valid && $urandom_range(0, 5) == 0) begin a_valid = 1; a_rec = rnd_rec(); end
      if (!b_valid && $urandom_range(0, 5) == 0) begin b_valid = 1; b_rec = rnd_rec(); end
      m_tready = (i < 1500) ? ($urandom_range(0, 3) == 0) : ($urandom_range(0, 3) != 0);
      @(negedge clk);
      if (a_valid && b_valid && (b_ready[0] || b_ready[1])) begin failures++; $display("B taken while A waits"); end
      if (a_valid && b_valid) prio_seen++;
      if (!a_ready[0] || !a_ready[1]) full_seen++;
      @(posedge clk); #1;
      // drop a request once both have taken it; hold otherwise
      if (a_valid && (a_ready[0] && a_ready[1])) a_valid = 0;
      if (b_valid && !a_valid && (b_ready[0] && b_ready[1])) b_valid = 0;
    end
    a_valid = 0; b_valid = 0; m_tready = 1;
    repeat (200) @(posedge clk); #1;
    checks++; if (q[0].size() != 0 || q[1].size() != 0) begin failures++; $display("left %0d %0d", q[0].size(), q[1].size()); end
    checks++; if (n_exp[0] < 100 || n_exp[1] < 100) begin failures++; $display("exported %0d %0d", n_exp[0], n_exp[1]); end
    checks++; if (full_seen == 0 || prio_seen == 0) begin failures++; $display("full %0d prio %0d", full_seen, prio_seen); end
    $display("exported %0d, full %0d cycles, priority cases %0d", n_exp[0], full_seen, prio_seen);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
