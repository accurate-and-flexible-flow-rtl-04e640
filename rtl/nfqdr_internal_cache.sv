// nfqdr_internal_cache: Internal Cache of the external-memory flow cache.
//
// Holds copies of the most recently created (or found) flows so that a burst
// of packets of one flow needs no memory read: on a hit the look-up process
// updates the copy and only writes the result back to memory, keeping the
// two identical. ENTRIES fully associative entries of {hash, slot, record};
// the look-up is combinational on (hash, 5-tuple). A write replaces the entry
// holding the same hash and slot, or else the entry pointed to by a
// round-robin counter. Invalidation (when a flow is exported and its slot
// cleared) removes the entry for that hash and slot; both processes can
// invalidate in the same cycle. Write and invalidate of the same entry in one
// cycle: the invalidate wins. The document gives
// the purpose; size, associativity and replacement are this design's choice.
module nfqdr_internal_cache
  import flow_pkg::*;
#(
  parameter int unsigned HW      = 18,
  parameter int unsigned ENTRIES = 8
) (
  input  logic              clk,
  input  logic              rst_n,
  // look-up
  input  logic [HW-1:0]     lk_hash,
  input  five_tuple_t       lk_tuple,
  output logic              lk_hit,
  output logic [1:0]        lk_slot,
  output flow_rec_t         lk_rec,
  // write (insert or refresh)
  input  logic              wr_en,
  input  logic [HW-1:0]     wr_hash,
  input  logic [1:0]        wr_slot,
  input  flow_rec_t         wr_rec,
  // invalidate, from the look-up process (a) and the timeout monitor (b)
  input  logic              inv_a_en,
  input  logic [HW-1:0]     inv_a_hash,
  input  logic [1:0]        inv_a_slot,
  input  logic              inv_b_en,
  input  logic [HW-1:0]     inv_b_hash,
  input  logic [1:0]        inv_b_slot
);
  localparam int unsigned IW = (ENTRIES > 1) ? $clog2(ENTRIES) : 1;
  logic [ENTRIES-1:0] valid;
  logic [HW-1:0]      hash_q [ENTRIES];
  logic [1:0]         slot_q [ENTRIES];
  flow_rec_t          rec_q  [ENTRIES];
  logic [IW-1:0]      rr;

  always_comb begin
    lk_hit = 1'b0; lk_slot = '0; lk_rec = '0;
    for (int i = 0; i < int'(ENTRIES); i++)
      if (valid[i] && hash_q[i] == lk_hash && rec_q[i].tuple == lk_tuple) begin
        lk_hit = 1'b1; lk_slot = slot_q[i]; lk_rec = rec_q[i];
      end
  end

  logic          same_found;
  logic [IW-1:0] same_idx;
  always_comb begin
    same_found = 1'b0; same_idx = '0;
    for (int i = 0; i < int'(ENTRIES); i++)
      if (valid[i] && hash_q[i] == wr_hash && slot_q[i] == wr_slot) begin
        same_found = 1'b1; same_idx = IW'(i);
      end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      valid <= '0; rr <= '0;
      for (int i = 0; i < int'(ENTRIES); i++) begin
        hash_q[i] <= '0; slot_q[i] <= '0; rec_q[i] <= '0;
      end
    end else begin
      if (wr_en) begin
        logic [IW-1:0] w;
        w = same_found ? same_idx : rr;
        valid[w] <= 1'b1; hash_q[w] <= wr_hash; slot_q[w] <= wr_slot; rec_q[w] <= wr_rec;
        if (!same_found) rr <= (rr == IW'(ENTRIES - 1)) ? '0 : rr + 1'b1;
      end
      for (int i = 0; i < int'(ENTRIES); i++)
        if (valid[i] && ((inv_a_en && hash_q[i] == inv_a_hash && slot_q[i] == inv_a_slot) ||
                         (inv_b_en && hash_q[i] == inv_b_hash && slot_q[i] == inv_b_slot)))
          valid[i] <= 1'b0;
    end
  end
endmodule
