// timeout_monitor: Process B of the flow cache (activity/inactivity monitor).
//
// A linear counter walks the flow table through port B, two cycles per
// entry: the entry is read (cycle 1) and judged (cycle 2). A busy entry
// expires when now - last_ts >= INACTIVE_TIMEOUT (no packet for that long)
// or now - first_ts >= ACTIVE_TIMEOUT (flow alive for that long); the
// subtraction is modulo 2^32, so the millisecond clock may wrap. An expired
// entry is offered on the export port and, in the cycle it is accepted, its
// busy flag is cleared; the walk waits meanwhile. Entries that Process A is
// reading or writing while they are being judged are left alone for this
// pass (counted in n_skipped) so that an update can never be lost or a flow
// brought back after export; this interlock is this design's choice. The
// timeouts default to 15 s and 30 min in milliseconds.
module timeout_monitor
  import flow_pkg::*;
#(
  parameter int unsigned AW               = 14,
  parameter int unsigned INACTIVE_TIMEOUT = 15_000,
  parameter int unsigned ACTIVE_TIMEOUT   = 1_800_000
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            table_ready,
  input  logic [TS_W-1:0] now,
  // flow table port B
  output logic            b_en,
  output logic            b_we,
  output logic [AW-1:0]   b_addr,
  output flow_entry_t     b_wdata,
  input  flow_entry_t     b_rdata,
  // Process A activity
  input  logic            a_rd_active,
  input  logic [AW-1:0]   a_rd_addr,
  input  logic            a_wr_active,
  input  logic [AW-1:0]   a_wr_addr,
  // expired flows
  output logic            exp_valid,
  input  logic            exp_ready,
  output flow_rec_t       exp_rec,
  // event counters
  output logic [31:0]     n_inactive,
  output logic [31:0]     n_active,
  output logic [31:0]     n_skipped,
  output logic [31:0]     n_sweeps
);
  typedef enum logic {S_READ, S_EVAL} state_t;
  state_t        state;
  logic [AW-1:0] ptr;
  logic          conflict_q;

  logic conflict_now, conflict, inact_exp, act_exp, expire;
  logic [TS_W-1:0] idle_time, age;

  always_comb begin
    idle_time = now - b_rdata.rec.last_ts;
    age       = now - b_rdata.rec.first_ts;
    inact_exp = idle_time >= TS_W'(INACTIVE_TIMEOUT);
    act_exp   = age       >= TS_W'(ACTIVE_TIMEOUT);
    expire    = b_rdata.busy && (inact_exp || act_exp);
    conflict_now = (a_rd_active && a_rd_addr == ptr) || (a_wr_active && a_wr_addr == ptr);
    conflict  = conflict_q || conflict_now;
  end

  assign exp_valid = (state == S_EVAL) && expire && !conflict;
  assign exp_rec   = b_rdata.rec;
  assign b_addr    = ptr;
  assign b_wdata   = '0;
  assign b_en      = table_ready && ((state == S_READ) || (exp_valid && exp_ready));
  assign b_we      = (state == S_EVAL) && exp_valid && exp_ready;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_READ;
      ptr   <= '0;
      conflict_q <= 1'b0;
      n_inactive <= '0; n_active <= '0; n_skipped <= '0; n_sweeps <= '0;
    end else if (table_ready) begin
      case (state)
        S_READ: begin
          // A write by A in this cycle would not be seen by our read.
          conflict_q <= a_wr_active && a_wr_addr == ptr;
          state      <= S_EVAL;
        end
        S_EVAL: begin
          conflict_q <= conflict;
          if (!expire || conflict || exp_ready) begin
            state <= S_READ;
            ptr   <= ptr + 1'b1;
            if (&ptr) n_sweeps <= n_sweeps + 1'b1;
            if (expire && conflict) n_skipped <= n_skipped + 1'b1;
            else if (expire) begin
              if (inact_exp) n_inactive <= n_inactive + 1'b1;
              else           n_active   <= n_active + 1'b1;
            end
          end
        end
        default: state <= S_READ;
      endcase
    end
  end
endmodule
