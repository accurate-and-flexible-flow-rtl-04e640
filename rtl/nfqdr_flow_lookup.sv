// nfqdr_flow_lookup: Flow Look-up and Create/Update Flows (Process A) of the
// external-memory flow cache.
//
// For each packet (5-tuple, flags, time, length, hash code) it first asks the
// internal cache. On a hit the cached record is updated and only written back
// (information word of that slot), so a burst of one flow costs no memory
// read. On a miss it reads the identity and the information words of the
// hash code, which return all three slots, and then:
//   - a slot holding the same 5-tuple is updated (information word written);
//   - otherwise the first free slot, from slot 0 to slot 2, gets the new flow
//     (identity and information words written);
//   - with all three slots held by other flows the packet is dropped
//     (a level-3 collision).
// A TCP packet with FIN or RST updates its flow, clears the slot's busy flag
// and exports the record at once; without a flow of its own it is exported as
// a one-packet record. Every record written to memory is also written to the
// internal cache; a cleared slot is invalidated there.
// The process publishes the hash code it is working on (act/act_hash) from
// the cycle it accepts a packet until its last write is granted, so that the
// timeout monitor leaves that hash code alone.
// Memory requests go through the arbiter (req/gnt); read data arrives in
// order on rvalid. The behaviour follows the document; the two-read sequence,
// the cache write policy and the interlock are this design's choices. The
// spare fields of both words (39 and 8 bits) are always written as zero.
module nfqdr_flow_lookup
  import flow_pkg::*;
  import qdr_pkg::*;
#(
  parameter int unsigned HW = 18
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 table_ready,
  // packets from the hashing module
  input  logic                 in_valid,
  output logic                 in_ready,
  input  pkt_info_t            in_info,
  input  logic [HW-1:0]        in_hash,
  // internal cache
  output logic [HW-1:0]        lk_hash,
  output five_tuple_t          lk_tuple,
  input  logic                 lk_hit,
  input  logic [1:0]           lk_slot,
  input  flow_rec_t            lk_rec,
  output logic                 c_wr_en,
  output logic [HW-1:0]        c_wr_hash,
  output logic [1:0]           c_wr_slot,
  output flow_rec_t            c_wr_rec,
  output logic                 c_inv_en,
  output logic [HW-1:0]        c_inv_hash,
  output logic [1:0]           c_inv_slot,
  // memory, through the arbiter
  output logic                 m_req,
  output logic [NSLOTS-1:0]    m_we,
  output logic [HW:0]          m_addr,
  output logic [NSLOTS*QW-1:0] m_wdata,
  input  logic                 m_gnt,
  input  logic                 m_rvalid,
  input  logic [NSLOTS*QW-1:0] m_rdata,
  // immediate export (FIN/RST)
  output logic                 exp_valid,
  input  logic                 exp_ready,
  output flow_rec_t            exp_rec,
  // hash code in use, for the timeout monitor
  output logic                 act,
  output logic [HW-1:0]        act_hash,
  // event counters
  output logic [31:0]          n_created,
  output logic [31:0]          n_updated,
  output logic [31:0]          n_collisions,
  output logic [31:0]          n_fin_rst,
  output logic [31:0]          n_cache_hits
);
  typedef enum logic [3:0] {S_IDLE, S_RD_ID, S_RD_INF, S_WAIT, S_DEC, S_W_ID, S_W_INF, S_EXP} state_t;
  state_t          state;
  pkt_info_t       pkt;
  logic [HW-1:0]   hash;
  qdr_id_t         ids  [NSLOTS];
  qdr_info_t       infs [NSLOTS];
  logic [1:0]      n_rd;
  logic [1:0]      slot;
  flow_rec_t       rec;          // record to write / export
  logic            do_inf, id_busy, do_exp;

  logic fin_rst_in, fin_rst;
  assign fin_rst_in = in_info.tcp_flags[TCP_FIN_BIT] | in_info.tcp_flags[TCP_RST_BIT];
  assign fin_rst    = pkt.tcp_flags[TCP_FIN_BIT] | pkt.tcp_flags[TCP_RST_BIT];

  function automatic flow_rec_t upd(flow_rec_t r, pkt_info_t p);
    flow_rec_t u;
    u = r;
    u.tcp_flags = r.tcp_flags | p.tcp_flags;
    u.last_ts   = p.ts;
    u.pkts      = r.pkts + 1'b1;
    u.bytes     = r.bytes + CNT_W'(p.bytes);
    return u;
  endfunction
  function automatic flow_rec_t one(pkt_info_t p);
    return '{tuple: p.tuple, tcp_flags: p.tcp_flags, first_ts: p.ts, last_ts: p.ts,
             pkts: 1, bytes: CNT_W'(p.bytes)};
  endfunction

  assign in_ready = (state == S_IDLE) && table_ready;
  assign lk_hash  = in_hash;
  assign lk_tuple = in_info.tuple;
  assign act      = (in_valid && in_ready) || (state != S_IDLE);
  assign act_hash = (state == S_IDLE) ? in_hash : hash;

  // decision on the three slots read from memory
  logic       match, free;
  logic [1:0] m_slot, f_slot;
  always_comb begin
    match = 1'b0; free = 1'b0; m_slot = '0; f_slot = '0;
    for (int s = NSLOTS - 1; s >= 0; s--) begin
      if (ids[s].busy && ids[s].tuple == pkt.tuple) begin match = 1'b1; m_slot = 2'(s); end
      if (!ids[s].busy) begin free = 1'b1; f_slot = 2'(s); end
    end
  end

  always_comb begin
    m_req = 1'b0; m_we = '0; m_addr = {hash, 1'b0}; m_wdata = '0;
    case (state)
      S_RD_ID:  begin m_req = 1'b1; m_addr = {hash, 1'b0}; end
      S_RD_INF: begin m_req = 1'b1; m_addr = {hash, 1'b1}; end
      S_W_ID: begin
        m_req = 1'b1; m_addr = {hash, 1'b0}; m_we[slot] = 1'b1;
        for (int s = 0; s < NSLOTS; s++) m_wdata[QW*s +: QW] = id_word(rec.tuple, id_busy);
      end
      S_W_INF: begin
        m_req = 1'b1; m_addr = {hash, 1'b1}; m_we[slot] = 1'b1;
        for (int s = 0; s < NSLOTS; s++) m_wdata[QW*s +: QW] = info_word(rec);
      end
      default: ;
    endcase
  end

  assign exp_valid = (state == S_EXP);
  assign exp_rec   = rec;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE; pkt <= '0; hash <= '0; n_rd <= '0; slot <= '0; rec <= '0;
      do_inf <= 1'b0; id_busy <= 1'b0; do_exp <= 1'b0;
      for (int s = 0; s < NSLOTS; s++) begin ids[s] <= '0; infs[s] <= '0; end
      c_wr_en <= 1'b0; c_wr_hash <= '0; c_wr_slot <= '0; c_wr_rec <= '0;
      c_inv_en <= 1'b0; c_inv_hash <= '0; c_inv_slot <= '0;
      n_created <= '0; n_updated <= '0; n_collisions <= '0; n_fin_rst <= '0; n_cache_hits <= '0;
    end else begin
      c_wr_en  <= 1'b0;
      c_inv_en <= 1'b0;
      case (state)
        S_IDLE: if (in_valid && in_ready) begin
          pkt  <= in_info;
          hash <= in_hash;
          if (lk_hit) begin
            // hit: update the copy, write back the information word only,
            // or, for FIN/RST, clear the slot and export
            n_cache_hits <= n_cache_hits + 1'b1;
            n_updated    <= n_updated + 1'b1;
            slot <= lk_slot;
            rec  <= upd(lk_rec, in_info);
            if (fin_rst_in) begin
              n_fin_rst <= n_fin_rst + 1'b1;
              id_busy <= 1'b0; do_inf <= 1'b0; do_exp <= 1'b1;
              c_inv_en <= 1'b1; c_inv_hash <= in_hash; c_inv_slot <= lk_slot;
              state <= S_W_ID;
            end else begin
              do_exp <= 1'b0;
              c_wr_en <= 1'b1; c_wr_hash <= in_hash; c_wr_slot <= lk_slot;
              c_wr_rec <= upd(lk_rec, in_info);
              state <= S_W_INF;
            end
          end else begin
            n_rd  <= '0;
            state <= S_RD_ID;
          end
        end
        S_RD_ID:  if (m_gnt) state <= S_RD_INF;
        S_RD_INF: if (m_gnt) state <= S_WAIT;
        S_WAIT: if (m_rvalid) begin
          for (int s = 0; s < NSLOTS; s++)
            if (n_rd == 2'd0) ids[s]  <= qdr_id_t'(m_rdata[QW*s +: QW]);
            else              infs[s] <= qdr_info_t'(m_rdata[QW*s +: QW]);
          n_rd <= n_rd + 1'b1;
          if (n_rd == 2'd1) state <= S_DEC;
        end
        S_DEC: begin
          if (match) begin
            n_updated <= n_updated + 1'b1;
            slot <= m_slot;
            rec  <= upd(rec_of(ids[m_slot], infs[m_slot]), pkt);
            if (fin_rst) begin
              n_fin_rst <= n_fin_rst + 1'b1;
              id_busy <= 1'b0; do_inf <= 1'b0; do_exp <= 1'b1;
              c_inv_en <= 1'b1; c_inv_hash <= hash; c_inv_slot <= m_slot;
              state <= S_W_ID;
            end else begin
              do_exp <= 1'b0;
              c_wr_en <= 1'b1; c_wr_hash <= hash; c_wr_slot <= m_slot;
              c_wr_rec <= upd(rec_of(ids[m_slot], infs[m_slot]), pkt);
              state <= S_W_INF;
            end
          end else if (fin_rst) begin
            n_fin_rst <= n_fin_rst + 1'b1;
            rec <= one(pkt);
            state <= S_EXP;
          end else if (free) begin
            n_created <= n_created + 1'b1;
            slot <= f_slot; rec <= one(pkt);
            id_busy <= 1'b1; do_inf <= 1'b1; do_exp <= 1'b0;
            c_wr_en <= 1'b1; c_wr_hash <= hash; c_wr_slot <= f_slot; c_wr_rec <= one(pkt);
            state <= S_W_ID;
          end else begin
            n_collisions <= n_collisions + 1'b1;
            state <= S_IDLE;
          end
        end
        S_W_ID: if (m_gnt) state <= do_inf ? S_W_INF : (do_exp ? S_EXP : S_IDLE);
        S_W_INF: if (m_gnt) state <= S_IDLE;
        S_EXP: if (exp_ready) state <= S_IDLE;
        default: state <= S_IDLE;
      endcase
    end
  end
endmodule
