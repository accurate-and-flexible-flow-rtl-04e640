// tb_timeout_monitor: Process B on a 16-entry flow table preloaded through
// port A. With the time held, one sweep must export exactly the busy
// entries whose idle time reached the inactive timeout or whose age reached
// the active timeout (including across a wrap of the millisecond counter),
// clear them and leave the rest untouched, under random export
// back-pressure. An entry that Process A is shown to be touching is skipped
// and exported on a later sweep once released. A sweep of an idle table
// takes two cycles per entry.
module tb_timeout_monitor;
  import flow_pkg::*;
  localparam int AW = 4, DEPTH = 16, INACT = 100, ACT = 1000;
  logic clk = 0, rst_n = 0, ready;
  logic [31:0] now;
  logic a_en, a_we, b_en, b_we;
  logic [AW-1:0] a_addr, b_addr;
  flow_entry_t a_wdata, a_rdata, b_wdata, b_rdata;
  logic a_rd_active, a_wr_active;
  logic [AW-1:0] a_rd_addr, a_wr_addr;
  assign a_wr_addr = b_addr;   // when a_wr_active, every visited entry is claimed
  logic exp_valid, exp_ready;
  flow_rec_t exp_rec;
  logic [31:0] n_inactive, n_active, n_skipped, n_sweeps;
  int checks = 0, failures = 0;
  flow_entry_t model [DEPTH];
  flow_rec_t got[$];
  always #5 clk = ~clk;

  flow_table #(.DEPTH(DEPTH)) u_tab (.clk, .rst_n, .init_done(ready),
    .a_en, .a_we, .a_addr, .a_wdata, .a_rdata, .b_en, .b_we, .b_addr, .b_wdata, .b_rdata);

  timeout_monitor #(.AW(AW), .INACTIVE_TIMEOUT(INACT), .ACTIVE_TIMEOUT(ACT)) dut (
    .clk, .rst_n, .table_ready(ready), .now, .b_en, .b_we, .b_addr, .b_wdata, .b_rdata,
    .a_rd_active, .a_rd_addr, .a_wr_active, .a_wr_addr, .exp_valid, .exp_ready, .exp_rec,
    .n_inactive, .n_active, .n_skipped, .n_sweeps);

  initial begin
    #5_000_000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  always @(negedge clk) if (rst_n && exp_valid && exp_ready) got.push_back(exp_rec);

  task automatic wait_sweeps(int n);
    logic [31:0] s0;
    s0 = n_sweeps;
    while (n_sweeps - s0 < n) begin @(posedge clk); #1; end
  endtask

  function automatic bit expired(flow_entry_t e);
    return e.busy && ((now - e.rec.last_ts >= INACT) || (now - e.rec.first_ts >= ACT));
  endfunction

  initial begin
    int n_exp_i, n_exp_a, idx, t0;
    flow_rec_t r;
    a_en = 0; a_we = 0; a_addr = 0; a_wdata = '0; exp_ready = 1; now = 32'd5000;
    a_rd_active = 0; a_wr_active = 0; a_rd_addr = 0;
    repeat (2) @(posedge clk); #1 rst_n = 1;
    while (!ready) begin @(posedge clk); #1; end
    for (int round = 0; round < 6; round++) begin
      // time base; round 3 sits just after a wrap of the counter
      now = (round == 3) ? 32'd20 : 32'd5000 + 32'(round) * 3000;
      // preload (Process B may run; nothing is busy until written)
      n_exp_i = 0; n_exp_a = 0;
      for (int i = 0; i < DEPTH; i++) begin
        flow_entry_t e;
        e.busy = $urandom_range(0, 3) != 0;
        e.rec.tuple = {$urandom, $urandom, $urandom, 8'($urandom)};
        e.rec.tcp_flags = 8'($urandom);
        e.rec.first_ts = now - 32'($urandom_range(0, 2 * ACT));
        e.rec.last_ts  = now - 32'($urandom_range(0, 2 * INACT));
        if (32'(now - e.rec.last_ts) > 32'(now - e.rec.first_ts)) e.rec.last_ts = e.rec.first_ts;
        e.rec.pkts = $urandom; e.rec.bytes = $urandom;
        if (round == 1 && i == 5) begin e.busy = 1; e.rec.last_ts = now - INACT; end
        model[i] = e;
      end
      // load with the monitor held back by claiming every address it visits
      a_wr_active = 1;
      for (int i = 0; i < DEPTH; i++) begin
        a_en = 1; a_we = 1; a_addr = AW'(i); a_wdata = model[i];
        @(posedge clk); #1;
      end
      a_en = 0; a_we = 0;
      got.delete();
      t0 = n_skipped;
      // release: keep claiming entry 5 through the read side during round 1
      a_wr_active = 0;
      if (round == 1) begin a_rd_active = 1; a_rd_addr = 4'd5; end
      fork
        wait_sweeps(2);
        repeat (200) begin @(posedge clk); #1 exp_ready = $urandom_range(0, 1); end
      join_any
      wait_sweeps(1);
      exp_ready = 1;
      a_rd_active = 0;
      if (round == 1) begin
        checks++;
        if (expired(model[5]) && got.size() != 0 && got[$].tuple == model[5].rec.tuple) begin
          failures++; $display("entry 5 exported while claimed");
        end
        wait_sweeps(2);
      end
      // compare the set of exports with the model
      for (int i = 0; i < DEPTH; i++) begin
        if (expired(model[i])) begin
          bit found;
          found = 0;
          foreach (got[j]) if (got[j] == model[i].rec) found = 1;
          checks++; if (!found) begin failures++; $display("round %0d entry %0d not exported", round, i); end
          model[i].busy = 1'b0;
        end
      end
      // table contents
      for (int i = 0; i < DEPTH; i++) begin
        a_en = 1; a_addr = AW'(i);
        @(posedge clk); #1;
        a_en = 0;
        checks++;
        if (a_rdata.busy !== model[i].busy || (model[i].busy && a_rdata !== model[i])) begin
          failures++; $display("round %0d entry %0d busy %0d exp %0d", round, i, a_rdata.busy, model[i].busy);
        end
      end
      if (round == 1) begin
        checks++; if (n_skipped == t0) begin failures++; $display("no skip counted"); end
      end
    end
    checks++; if (n_inactive == 0 || n_active == 0) begin failures++; $display("i %0d a %0d", n_inactive, n_active); end
    // idle sweep timing: 2 cycles per entry
    wait_sweeps(1);
    t0 = $time;
    wait_sweeps(1);
    checks++; if (($time - t0) / 10 != 2 * DEPTH) begin failures++; $display("sweep %0d cycles", ($time - t0) / 10); end
    $display("inactive %0d active %0d skipped %0d", n_inactive, n_active, n_skipped);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
