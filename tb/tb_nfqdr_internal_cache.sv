// tb_nfqdr_internal_cache: random writes, invalidations (both ports) and
// look-ups on a 4-entry cache with 4-bit hash codes, against a model that
// keeps the same entries and the same round-robin replacement (an invalidation
// is judged on the entries before the same cycle's write and wins over it). Every cycle
// the look-up result (hit, slot, record) is compared with the model.
module tb_nfqdr_internal_cache;
  import flow_pkg::*;
  import tb_util_pkg::*;
  localparam int HW = 4, E = 4;
  logic clk = 0, rst_n = 0;
  logic [HW-1:0] lk_hash, wr_hash, ia_hash, ib_hash;
  five_tuple_t lk_tuple;
  logic lk_hit, wr_en, ia_en, ib_en;
  logic [1:0] lk_slot, wr_slot, ia_slot, ib_slot;
  flow_rec_t lk_rec, wr_rec;
  int checks = 0, failures = 0, hits = 0;
  // model
  bit m_v [E]; logic [HW-1:0] m_h [E]; logic [1:0] m_s [E]; flow_rec_t m_r [E]; int rr = 0;
  five_tuple_t pool [6];
  always #5 clk = ~clk;

  nfqdr_internal_cache #(.HW(HW), .ENTRIES(E)) dut (
    .clk, .rst_n, .lk_hash, .lk_tuple, .lk_hit, .lk_slot, .lk_rec,
    .wr_en, .wr_hash, .wr_slot, .wr_rec,
    .inv_a_en(ia_en), .inv_a_hash(ia_hash), .inv_a_slot(ia_slot),
    .inv_b_en(ib_en), .inv_b_hash(ib_hash), .inv_b_slot(ib_slot));

  initial begin
    #1_000_000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    for (int i = 0; i < 6; i++) pool[i] = rand_tuple(1);
    for (int i = 0; i < E; i++) begin m_v[i] = 0; m_h[i] = '0; m_s[i] = '0; m_r[i] = '0; end
    wr_en = 0; ia_en = 0; ib_en = 0; lk_hash = '0; lk_tuple = '0; wr_hash = '0; wr_slot = '0; wr_rec = '0;
    ia_hash = '0; ia_slot = '0; ib_hash = '0; ib_slot = '0;
    repeat (2) @(posedge clk); #1 rst_n = 1;
    for (int c = 0; c < 3000; c++) begin
      bit e_hit; logic [1:0] e_slot; flow_rec_t e_rec;
      int same; bit kill [E];
      // drive a random cycle
      wr_en = ($urandom_range(0, 2) == 0);
      wr_hash = HW'($urandom_range(0, 3)); wr_slot = 2'($urandom_range(0, 2));
      wr_rec = '0; wr_rec.tuple = pool[$urandom_range(0, 5)]; wr_rec.pkts = $urandom; wr_rec.bytes = $urandom;
      ia_en = ($urandom_range(0, 5) == 0); ia_hash = HW'($urandom_range(0, 3)); ia_slot = 2'($urandom_range(0, 2));
      ib_en = ($urandom_range(0, 5) == 0); ib_hash = HW'($urandom_range(0, 3)); ib_slot = 2'($urandom_range(0, 2));
      lk_hash = HW'($urandom_range(0, 3)); lk_tuple = pool[$urandom_range(0, 5)];
      // expected look-up before this cycle's updates (highest index wins)
      e_hit = 0; e_slot = '0; e_rec = '0;
      for (int i = 0; i < E; i++) if (m_v[i] && m_h[i] == lk_hash && m_r[i].tuple == lk_tuple) begin
        e_hit = 1; e_slot = m_s[i]; e_rec = m_r[i];
      end
      @(negedge clk);
      checks++;
      if (lk_hit !== e_hit || (e_hit && (lk_slot !== e_slot || lk_rec !== e_rec))) begin
        failures++; $display("cycle %0d: hit %0d/%0d", c, lk_hit, e_hit);
      end
      if (e_hit) hits++;
      // model update; invalidations judge the entries as they were before
      // this cycle's write, and win over it
      for (int i = 0; i < E; i++)
        kill[i] = m_v[i] && ((ia_en && m_h[i] == ia_hash && m_s[i] == ia_slot) ||
                             (ib_en && m_h[i] == ib_hash && m_s[i] == ib_slot));
      if (wr_en) begin
        same = -1;
        for (int i = 0; i < E; i++) if (m_v[i] && m_h[i] == wr_hash && m_s[i] == wr_slot) same = i;
        if (same < 0) begin same = rr; rr = (rr + 1) % E; end
        m_v[same] = 1; m_h[same] = wr_hash; m_s[same] = wr_slot; m_r[same] = wr_rec;
      end
      for (int i = 0; i < E; i++) if (kill[i]) m_v[i] = 0;
      @(posedge clk); #1;
    end
    checks++; if (hits < 50) begin failures++; $display("only %0d hits", hits); end
    $display("hits %0d", hits);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
