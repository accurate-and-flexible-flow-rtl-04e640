// create_update_flows: Process A of the flow cache (flow creation and update).
//
// For each parsed packet and its hash code the entry at that address of the
// flow table is read through port A (cycle 1, the cycle the packet is
// accepted) and acted on in the next cycle (cycle 2):
//   * busy and same 5-tuple: update it (TCP flags ORed, last timestamp,
//     packet counter +1, byte counter + IP length);
//   * busy and different 5-tuple: collision, the packet is discarded;
//   * free: a new flow is created with one packet.
// A TCP packet with FIN or RST set ends its flow at once: a matching flow is
// updated and exported and its entry freed; if the entry is free or holds
// another flow, the packet alone is exported as a one-packet record and the
// table is left as it is. Exports leave on a valid/ready port; cycle 2
// waits while an export is not accepted. A packet thus costs two cycles,
// well inside the 12-cycle budget of minimum-size frames at 10 Gb/s.
// The current read address and the address held in cycle 2 are published
// so that the timeout monitor can avoid touching an entry that this process
// is modifying (this interlock is this design's own choice).
module create_update_flows
  import flow_pkg::*;
#(
  parameter int unsigned AW = 14
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          table_ready,
  // packet and hash from the hashing stage
  input  logic          in_valid,
  output logic          in_ready,
  input  pkt_info_t     in_info,
  input  logic [AW-1:0] in_hash,
  // flow table port A
  output logic          a_en,
  output logic          a_we,
  output logic [AW-1:0] a_addr,
  output flow_entry_t   a_wdata,
  input  flow_entry_t   a_rdata,
  // immediate exports (FIN/RST)
  output logic          exp_valid,
  input  logic          exp_ready,
  output flow_rec_t     exp_rec,
  // interlock information for Process B
  output logic          rd_active,
  output logic [AW-1:0] rd_addr,
  output logic          wr_active,
  output logic [AW-1:0] wr_addr,
  // event counters
  output logic [31:0]   n_created,
  output logic [31:0]   n_updated,
  output logic [31:0]   n_collisions,
  output logic [31:0]   n_fin_rst
);
  typedef enum logic {S_IDLE, S_ACT} state_t;
  state_t        state;
  pkt_info_t     pkt;
  logic [AW-1:0] addr;

  logic      fin_rst, match, hit_busy;
  flow_rec_t upd_rec, one_rec;

  always_comb begin
    fin_rst  = pkt.tcp_flags[TCP_FIN_BIT] | pkt.tcp_flags[TCP_RST_BIT];
    hit_busy = a_rdata.busy;
    match    = hit_busy && (a_rdata.rec.tuple == pkt.tuple);
    upd_rec  = a_rdata.rec;
    upd_rec.tcp_flags = a_rdata.rec.tcp_flags | pkt.tcp_flags;
    upd_rec.last_ts   = pkt.ts;
    upd_rec.pkts      = a_rdata.rec.pkts + 1'b1;
    upd_rec.bytes     = a_rdata.rec.bytes + CNT_W'(pkt.bytes);
    one_rec = '{tuple: pkt.tuple, tcp_flags: pkt.tcp_flags, first_ts: pkt.ts,
                last_ts: pkt.ts, pkts: CNT_W'(1), bytes: CNT_W'(pkt.bytes)};
  end

  assign in_ready  = (state == S_IDLE) && table_ready;
  assign rd_active = in_valid && in_ready;
  assign rd_addr   = in_hash;
  assign wr_active = (state == S_ACT);
  assign wr_addr   = addr;

  // Export request in cycle 2.
  assign exp_valid = (state == S_ACT) && fin_rst;
  assign exp_rec   = match ? upd_rec : one_rec;

  always_comb begin
    a_en    = 1'b0;
    a_we    = 1'b0;
    a_addr  = in_hash;
    a_wdata = '0;
    if (state == S_IDLE) begin
      a_en = rd_active;
    end else if (!fin_rst || exp_ready) begin
      a_addr = addr;
      if (match) begin
        a_en = 1'b1; a_we = 1'b1;
        a_wdata = fin_rst ? flow_entry_t'('0) : '{busy: 1'b1, rec: upd_rec};
      end else if (!hit_busy && !fin_rst) begin
        a_en = 1'b1; a_we = 1'b1;
        a_wdata = '{busy: 1'b1, rec: one_rec};
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE;
      pkt   <= '0;
      addr  <= '0;
      n_created <= '0; n_updated <= '0; n_collisions <= '0; n_fin_rst <= '0;
    end else begin
      case (state)
        S_IDLE: if (rd_active) begin
          pkt   <= in_info;
          addr  <= in_hash;
          state <= S_ACT;
        end
        S_ACT: if (!fin_rst || exp_ready) begin
          state <= S_IDLE;
          if (match)          n_updated    <= n_updated + 1'b1;
          else if (hit_busy)  n_collisions <= n_collisions + 1'b1;
          else if (!fin_rst)  n_created    <= n_created + 1'b1;
          if (fin_rst)        n_fin_rst    <= n_fin_rst + 1'b1;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

`ifndef SYNTHESIS
  // An export request is held until accepted.
  a_exp_hold: assert property (@(posedge clk) disable iff (!rst_n)
    exp_valid && !exp_ready |=> exp_valid && $stable(exp_rec));
`endif
endmodule
