// nfqdr_timeout_monitor: Timeout Conditions Monitor (Process B) of the
// external-memory flow cache.
//
// After reset it first writes a cleared identity word to every hash code in
// all three slots (the external memory holds garbage at power-up) and then
// raises table_ready. From then on it sweeps the hash codes with a linear
// counter: it reads the identity and information words (all three slots),
// and for each busy slot whose flow has been idle for INACTIVE_TIMEOUT ms or
// has lived for ACTIVE_TIMEOUT ms it writes the identity word back with the
// busy flag clear, invalidates the internal-cache copy and exports the
// record. A hash code that the look-up process is working on, at any time
// between the read and the clearing write, is left for the next sweep
// (counted as skipped), so no update can be lost. All memory traffic goes
// through the arbiter, where Process A has priority. The expiry rules follow
// the document; the initial clear and the interlock are this design's own.
module nfqdr_timeout_monitor
  import flow_pkg::*;
  import qdr_pkg::*;
#(
  parameter int unsigned HW               = 18,
  parameter int unsigned INACTIVE_TIMEOUT = 15_000,
  parameter int unsigned ACTIVE_TIMEOUT   = 1_800_000
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic [TS_W-1:0]      now,
  output logic                 table_ready,
  // memory, through the arbiter
  output logic                 m_req,
  output logic [NSLOTS-1:0]    m_we,
  output logic [HW:0]          m_addr,
  output logic [NSLOTS*QW-1:0] m_wdata,
  input  logic                 m_gnt,
  input  logic                 m_rvalid,
  input  logic [NSLOTS*QW-1:0] m_rdata,
  // hash code in use by the look-up process
  input  logic                 a_act,
  input  logic [HW-1:0]        a_hash,
  // internal cache invalidation
  output logic                 c_inv_en,
  output logic [HW-1:0]        c_inv_hash,
  output logic [1:0]           c_inv_slot,
  // expired flows
  output logic                 exp_valid,
  input  logic                 exp_ready,
  output flow_rec_t            exp_rec,
  // event counters
  output logic [31:0]          n_inactive,
  output logic [31:0]          n_active,
  output logic [31:0]          n_skipped,
  output logic [31:0]          n_sweeps
);
  typedef enum logic [2:0] {S_INIT, S_RD_ID, S_RD_INF, S_WAIT, S_EVAL, S_CLR, S_EXP} state_t;
  state_t        state;
  logic [HW-1:0] ptr;
  qdr_id_t       ids  [NSLOTS];
  qdr_info_t     infs [NSLOTS];
  logic [1:0]    n_rd, slot;
  logic          conflict_q, was_inact;

  logic conflict;
  assign conflict = conflict_q || (a_act && a_hash == ptr);

  // evaluation of the current slot
  flow_rec_t       cur;
  logic            inact_exp, act_exp, expire;
  always_comb begin
    cur       = rec_of(ids[slot], infs[slot]);
    inact_exp = (now - cur.last_ts)  >= TS_W'(INACTIVE_TIMEOUT);
    act_exp   = (now - cur.first_ts) >= TS_W'(ACTIVE_TIMEOUT);
    expire    = ids[slot].busy && (inact_exp || act_exp);
  end

  always_comb begin
    m_req = 1'b0; m_we = '0; m_addr = {ptr, 1'b0}; m_wdata = '0;
    case (state)
      S_INIT: begin m_req = 1'b1; m_we = '1; end
      S_RD_ID: m_req = 1'b1;
      S_RD_INF: begin m_req = 1'b1; m_addr = {ptr, 1'b1}; end
      S_CLR: begin
        m_req = !conflict; m_we[slot] = 1'b1;
        for (int s = 0; s < NSLOTS; s++) m_wdata[QW*s +: QW] = id_word(ids[slot].tuple, 1'b0);
      end
      default: ;
    endcase
  end

  assign exp_valid  = (state == S_EXP);
  assign exp_rec    = cur;
  assign c_inv_en   = (state == S_CLR) && m_gnt;
  assign c_inv_hash = ptr;
  assign c_inv_slot = slot;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_INIT; ptr <= '0; n_rd <= '0; slot <= '0; conflict_q <= 1'b0; was_inact <= 1'b0;
      table_ready <= 1'b0;
      for (int s = 0; s < NSLOTS; s++) begin ids[s] <= '0; infs[s] <= '0; end
      n_inactive <= '0; n_active <= '0; n_skipped <= '0; n_sweeps <= '0;
    end else begin
      case (state)
        S_INIT: if (m_gnt) begin
          ptr <= ptr + 1'b1;
          if (&ptr) begin table_ready <= 1'b1; state <= S_RD_ID; end
        end
        S_RD_ID: if (m_gnt) begin
          conflict_q <= a_act && a_hash == ptr;
          state <= S_RD_INF;
        end
        S_RD_INF: begin
          conflict_q <= conflict;
          if (m_gnt) begin n_rd <= '0; state <= S_WAIT; end
        end
        S_WAIT: begin
          conflict_q <= conflict;
          if (m_rvalid) begin
            for (int s = 0; s < NSLOTS; s++)
              if (n_rd == 2'd0) ids[s]  <= qdr_id_t'(m_rdata[QW*s +: QW]);
              else              infs[s] <= qdr_info_t'(m_rdata[QW*s +: QW]);
            n_rd <= n_rd + 1'b1;
            if (n_rd == 2'd1) begin slot <= '0; state <= S_EVAL; end
          end
        end
        S_EVAL: begin
          conflict_q <= conflict;
          if (expire && conflict) n_skipped <= n_skipped + 1'b1;
          if (expire && !conflict) begin
            was_inact <= inact_exp;
            state <= S_CLR;
          end else if (slot == 2'(NSLOTS - 1)) begin
            ptr <= ptr + 1'b1;
            if (&ptr) n_sweeps <= n_sweeps + 1'b1;
            state <= S_RD_ID;
          end else slot <= slot + 1'b1;
        end
        S_CLR: begin
          conflict_q <= conflict;
          if (conflict) begin
            // the look-up process took this hash code meanwhile
            n_skipped <= n_skipped + 1'b1;
            ptr <= ptr + 1'b1;
            if (&ptr) n_sweeps <= n_sweeps + 1'b1;
            state <= S_RD_ID;
          end else if (m_gnt) state <= S_EXP;
        end
        S_EXP: if (exp_ready) begin
          if (was_inact) n_inactive <= n_inactive + 1'b1;
          else           n_active   <= n_active + 1'b1;
          if (slot == 2'(NSLOTS - 1)) begin
            ptr <= ptr + 1'b1;
            if (&ptr) n_sweeps <= n_sweeps + 1'b1;
            state <= S_RD_ID;
          end else begin
            slot  <= slot + 1'b1;
            state <= S_EVAL;
          end
        end
        default: state <= S_RD_ID;
      endcase
    end
  end
endmodule
