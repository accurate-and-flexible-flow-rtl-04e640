// netflow_cache: the NF_BRAM flow cache.
//
// Frames from the MAC (64-bit AXI4-Stream slave) go through the packet
// parser, the hashing stage and Process A (create_update_flows), which keeps
// one record per active flow in a BRAM flow table addressed by the 14-bit
// hash. Process B (timeout_monitor) walks the same table through the second
// RAM port and removes flows that are idle or too old. Records removed by
// either process pass through the export module's FIFO to the 64-bit
// AXI4-Stream master. A millisecond counter timestamps frames and ages
// flows. Throughput: one parsed packet every 2 cycles, against one every 12
// cycles for minimum-size frames at 10 Gb/s with a 200 MHz 64-bit MAC
// interface. The structure follows the document; the status counters and
// the interlock between the two processes are this design's additions.
module netflow_cache
  import flow_pkg::*;
#(
  parameter int unsigned TABLE_DEPTH      = 16384,
  parameter int unsigned CYCLES_PER_MS    = 200_000,
  parameter int unsigned INACTIVE_TIMEOUT = 15_000,
  parameter int unsigned ACTIVE_TIMEOUT   = 1_800_000,
  parameter bit          NETFLOW_EXPORT_PRESENT = 1'b1,
  parameter int unsigned EXPORT_FIFO_DEPTH = 64
) (
  input  logic        clk,
  input  logic        rst_n,
  // frames from the MAC
  input  logic [63:0] s_tdata,
  input  logic [7:0]  s_tkeep,
  input  logic        s_tvalid,
  output logic        s_tready,
  input  logic        s_tlast,
  input  logic        s_tuser,
  // exported flow records
  output logic [63:0] m_tdata,
  output logic [7:0]  m_tkeep,
  output logic        m_tvalid,
  input  logic        m_tready,
  output logic        m_tlast,
  // time and status
  output logic [TS_W-1:0] now,
  output logic        ready,
  output logic [31:0] n_accepted,
  output logic [31:0] n_rejected,
  output logic [31:0] n_dropped,
  output logic [31:0] n_created,
  output logic [31:0] n_updated,
  output logic [31:0] n_collisions,
  output logic [31:0] n_fin_rst,
  output logic [31:0] n_inactive,
  output logic [31:0] n_active,
  output logic [31:0] n_skipped,
  output logic [31:0] n_sweeps,
  output logic [31:0] n_exported
);
  localparam int unsigned AW = $clog2(TABLE_DEPTH);

  timestamp_counter #(.CYCLES_PER_TICK(CYCLES_PER_MS), .TS_W(TS_W)) u_time (
    .clk, .rst_n, .now, .tick());

  logic      p_valid, p_ready;
  pkt_info_t p_info;
  pkt_parser u_parser (
    .clk, .rst_n, .now,
    .s_tdata, .s_tkeep, .s_tvalid, .s_tready, .s_tlast, .s_tuser,
    .out_valid(p_valid), .out_ready(p_ready), .out_info(p_info),
    .accepted(n_accepted), .rejected(n_rejected), .dropped(n_dropped));

  logic          h_valid, h_ready;
  pkt_info_t     h_info;
  logic [AW-1:0] h_hash;
  flow_hash #(.HASH_W(AW)) u_hash (
    .clk, .rst_n,
    .in_valid(p_valid), .in_ready(p_ready), .in_info(p_info),
    .out_valid(h_valid), .out_ready(h_ready), .out_info(h_info), .out_hash(h_hash));

  logic          a_en, a_we, b_en, b_we;
  logic [AW-1:0] a_addr, b_addr;
  flow_entry_t   a_wdata, a_rdata, b_wdata, b_rdata;

  flow_table #(.DEPTH(TABLE_DEPTH)) u_table (
    .clk, .rst_n, .init_done(ready),
    .a_en, .a_we, .a_addr, .a_wdata, .a_rdata,
    .b_en, .b_we, .b_addr, .b_wdata, .b_rdata);

  logic          ea_valid, ea_ready, eb_valid, eb_ready;
  flow_rec_t     ea_rec, eb_rec;
  logic          a_rd_active, a_wr_active;
  logic [AW-1:0] a_rd_addr, a_wr_addr;

  create_update_flows #(.AW(AW)) u_proc_a (
    .clk, .rst_n, .table_ready(ready),
    .in_valid(h_valid), .in_ready(h_ready), .in_info(h_info), .in_hash(h_hash),
    .a_en, .a_we, .a_addr, .a_wdata, .a_rdata,
    .exp_valid(ea_valid), .exp_ready(ea_ready), .exp_rec(ea_rec),
    .rd_active(a_rd_active), .rd_addr(a_rd_addr), .wr_active(a_wr_active), .wr_addr(a_wr_addr),
    .n_created, .n_updated, .n_collisions, .n_fin_rst);

  timeout_monitor #(.AW(AW), .INACTIVE_TIMEOUT(INACTIVE_TIMEOUT),
                    .ACTIVE_TIMEOUT(ACTIVE_TIMEOUT)) u_proc_b (
    .clk, .rst_n, .table_ready(ready), .now,
    .b_en, .b_we, .b_addr, .b_wdata, .b_rdata,
    .a_rd_active, .a_rd_addr, .a_wr_active, .a_wr_addr,
    .exp_valid(eb_valid), .exp_ready(eb_ready), .exp_rec(eb_rec),
    .n_inactive, .n_active, .n_skipped, .n_sweeps);

  export_module #(.NETFLOW_EXPORT_PRESENT(NETFLOW_EXPORT_PRESENT),
                  .FIFO_DEPTH(EXPORT_FIFO_DEPTH)) u_export (
    .clk, .rst_n,
    .a_valid(ea_valid), .a_ready(ea_ready), .a_rec(ea_rec),
    .b_valid(eb_valid), .b_ready(eb_ready), .b_rec(eb_rec),
    .m_tdata, .m_tkeep, .m_tvalid, .m_tready, .m_tlast, .n_exported);
endmodule
