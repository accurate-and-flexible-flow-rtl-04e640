// netflow_top: flow monitor for one 10 Gb/s Ethernet link.
//
// The flow cache (NF_BRAM architecture) classifies every frame received on
// MAC port 0 into flows held in an on-chip table and exports finished flows;
// the NetFlow v5 export engine packs them into NetFlow v5 datagrams sent on
// MAC port 1. Both MAC user interfaces are 64-bit AXI4-Stream at the 200 MHz
// core clock; the MACs, PHYs and the processor that configures them are
// outside this module. Status counters of the cache come out for
// monitoring. With NETFLOW_EXPORT_PRESENT = 0 the cache instead sends one
// plain Ethernet frame per flow on port 1 and the export engine is left
// out.
// The external-memory flow cache (NF_QDR architecture) stands beside it as
// the document's second design: its own receive link (MAC port 2, q_rx_*),
// its own stream of 30-byte records (q_m_*, for a NetFlow export engine or a
// plain interface), the user side of its QDR-II memory controller (q_mem_*)
// and its own counters (q_stat). The two caches share only clock and reset.
module netflow_top
  import flow_pkg::*;
  import qdr_pkg::*;
#(
  parameter int unsigned TABLE_DEPTH      = 16384,
  parameter int unsigned CYCLES_PER_MS    = 200_000,
  parameter int unsigned INACTIVE_TIMEOUT = 15_000,
  parameter int unsigned ACTIVE_TIMEOUT   = 1_800_000,
  parameter bit          NETFLOW_EXPORT_PRESENT = 1'b1,
  parameter int unsigned N_FLOWS          = 30,
  parameter int unsigned WAIT_MS          = 60_000,
  parameter int unsigned QDR_HASH_W       = 18,
  parameter int unsigned QDR_CACHE_ENTRIES = 8
) (
  input  logic        clk,
  input  logic        rst_n,
  // MAC port 0 receive
  input  logic [63:0] rx_tdata,
  input  logic [7:0]  rx_tkeep,
  input  logic        rx_tvalid,
  output logic        rx_tready,
  input  logic        rx_tlast,
  input  logic        rx_tuser,
  // MAC port 1 transmit
  output logic [63:0] tx_tdata,
  output logic [7:0]  tx_tkeep,
  output logic        tx_tvalid,
  input  logic        tx_tready,
  output logic        tx_tlast,
  // status
  output logic        ready,
  output logic [TS_W-1:0] now,
  output logic [31:0] stat [13],
  // external-memory flow cache: MAC port 2 receive
  input  logic [63:0] q_rx_tdata,
  input  logic [7:0]  q_rx_tkeep,
  input  logic        q_rx_tvalid,
  output logic        q_rx_tready,
  input  logic        q_rx_tlast,
  input  logic        q_rx_tuser,
  // its exported 30-byte records
  output logic [63:0] q_m_tdata,
  output logic [7:0]  q_m_tkeep,
  output logic        q_m_tvalid,
  input  logic        q_m_tready,
  output logic        q_m_tlast,
  // its QDR memory controller (user side), three slot modules in lockstep
  output logic                            q_mem_req,
  output logic [NSLOTS-1:0]      q_mem_we,
  output logic [QDR_HASH_W:0]             q_mem_addr,
  output logic [NSLOTS*QW-1:0] q_mem_wdata,
  input  logic                            q_mem_rvalid,
  input  logic [NSLOTS*QW-1:0] q_mem_rdata,
  // its status: table cleared, and counters (accepted, rejected, dropped,
  // created, updated, collisions, FIN/RST, cache hits, inactive, active,
  // skipped, sweeps, exported)
  output logic        q_ready,
  output logic [31:0] q_stat [13]
);
  logic [63:0] c_tdata;
  logic [7:0]  c_tkeep;
  logic        c_tvalid, c_tready, c_tlast;

  netflow_cache #(
    .TABLE_DEPTH(TABLE_DEPTH), .CYCLES_PER_MS(CYCLES_PER_MS),
    .INACTIVE_TIMEOUT(INACTIVE_TIMEOUT), .ACTIVE_TIMEOUT(ACTIVE_TIMEOUT),
    .NETFLOW_EXPORT_PRESENT(NETFLOW_EXPORT_PRESENT)
  ) u_cache (
    .clk, .rst_n,
    .s_tdata(rx_tdata), .s_tkeep(rx_tkeep), .s_tvalid(rx_tvalid), .s_tready(rx_tready),
    .s_tlast(rx_tlast), .s_tuser(rx_tuser),
    .m_tdata(c_tdata), .m_tkeep(c_tkeep), .m_tvalid(c_tvalid), .m_tready(c_tready),
    .m_tlast(c_tlast),
    .now, .ready,
    .n_accepted(stat[0]), .n_rejected(stat[1]), .n_dropped(stat[2]), .n_created(stat[3]),
    .n_updated(stat[4]), .n_collisions(stat[5]), .n_fin_rst(stat[6]), .n_inactive(stat[7]),
    .n_active(stat[8]), .n_skipped(stat[9]), .n_sweeps(stat[10]), .n_exported(stat[11]));

  // The external-memory variant stands beside the on-chip one with its own
  // link, record stream and memory port.
  nfqdr_cache #(
    .HASH_W(QDR_HASH_W), .CACHE_ENTRIES(QDR_CACHE_ENTRIES), .CYCLES_PER_MS(CYCLES_PER_MS),
    .INACTIVE_TIMEOUT(INACTIVE_TIMEOUT), .ACTIVE_TIMEOUT(ACTIVE_TIMEOUT),
    .NETFLOW_EXPORT_PRESENT(1'b1)
  ) u_qdr (
    .clk, .rst_n,
    .s_tdata(q_rx_tdata), .s_tkeep(q_rx_tkeep), .s_tvalid(q_rx_tvalid), .s_tready(q_rx_tready),
    .s_tlast(q_rx_tlast), .s_tuser(q_rx_tuser),
    .m_tdata(q_m_tdata), .m_tkeep(q_m_tkeep), .m_tvalid(q_m_tvalid), .m_tready(q_m_tready),
    .m_tlast(q_m_tlast),
    .mem_req(q_mem_req), .mem_we(q_mem_we), .mem_addr(q_mem_addr), .mem_wdata(q_mem_wdata),
    .mem_rvalid(q_mem_rvalid), .mem_rdata(q_mem_rdata),
    .now(), .ready(q_ready),
    .n_accepted(q_stat[0]), .n_rejected(q_stat[1]), .n_dropped(q_stat[2]), .n_created(q_stat[3]),
    .n_updated(q_stat[4]), .n_collisions(q_stat[5]), .n_fin_rst(q_stat[6]), .n_cache_hits(q_stat[7]),
    .n_inactive(q_stat[8]), .n_active(q_stat[9]), .n_skipped(q_stat[10]), .n_sweeps(q_stat[11]),
    .n_exported(q_stat[12]));

  if (NETFLOW_EXPORT_PRESENT) begin : g_export
    netflow_export #(.N_FLOWS(N_FLOWS), .WAIT_MS(WAIT_MS), .CYCLES_PER_MS(CYCLES_PER_MS)) u_export (
      .clk, .rst_n,
      .s_tdata(c_tdata), .s_tkeep(c_tkeep), .s_tvalid(c_tvalid), .s_tready(c_tready),
      .s_tlast(c_tlast),
      .m_tdata(tx_tdata), .m_tkeep(tx_tkeep), .m_tvalid(tx_tvalid), .m_tready(tx_tready),
      .m_tlast(tx_tlast), .n_frames(stat[12]));
  end else begin : g_direct
    assign tx_tdata  = c_tdata;
    assign tx_tkeep  = c_tkeep;
    assign tx_tvalid = c_tvalid;
    assign tx_tlast  = c_tlast;
    assign c_tready  = tx_tready;
    assign stat[12]  = stat[11];
  end
endmodule
