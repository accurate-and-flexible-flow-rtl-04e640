// nfqdr_cache: the external-memory flow cache (NF_QDR).
//
// Same packet path and export as the on-chip cache (parser, hashing module,
// export module, millisecond counter), but the flow table lives in three
// external QDR-II SRAM modules reached through one memory port: each hash
// code has three slots, one per module, so up to three flows with the same
// hash code are kept and only a fourth is dropped; each flow takes two
// addresses (identity word, information word). The flow look-up process
// (Process A) asks the internal cache first and reads memory only on a miss;
// the timeout monitor (Process B) first clears the memory and then sweeps it;
// the memory arbiter gives Process A priority on the shared port.
// The memory controller and SRAMs are outside: the mem_* ports are the user
// side of a controller returning reads in order on mem_rvalid.
// With the default 18-bit hash the table holds 3 x 2^18 = 786,432 flows.
// Structure and behaviour follow the document; the cache size, the arbiter
// limits and the interlock are this design's choices.
module nfqdr_cache
  import flow_pkg::*;
  import qdr_pkg::*;
#(
  parameter int unsigned HASH_W           = 18,
  parameter int unsigned CACHE_ENTRIES    = 8,
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
  // external memory (controller user side), three slot modules in lockstep
  output logic                  mem_req,
  output logic [NSLOTS-1:0]     mem_we,
  output logic [HASH_W:0]       mem_addr,
  output logic [NSLOTS*QW-1:0]  mem_wdata,
  input  logic                  mem_rvalid,
  input  logic [NSLOTS*QW-1:0]  mem_rdata,
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
  output logic [31:0] n_cache_hits,
  output logic [31:0] n_inactive,
  output logic [31:0] n_active,
  output logic [31:0] n_skipped,
  output logic [31:0] n_sweeps,
  output logic [31:0] n_exported
);
  timestamp_counter #(.CYCLES_PER_TICK(CYCLES_PER_MS), .TS_W(TS_W)) u_time (
    .clk, .rst_n, .now, .tick());

  logic      p_valid, p_ready;
  pkt_info_t p_info;
  pkt_parser u_parser (
    .clk, .rst_n, .now,
    .s_tdata, .s_tkeep, .s_tvalid, .s_tready, .s_tlast, .s_tuser,
    .out_valid(p_valid), .out_ready(p_ready), .out_info(p_info),
    .accepted(n_accepted), .rejected(n_rejected), .dropped(n_dropped));

  logic              h_valid, h_ready;
  pkt_info_t         h_info;
  logic [HASH_W-1:0] h_hash;
  flow_hash #(.HASH_W(HASH_W)) u_hash (
    .clk, .rst_n,
    .in_valid(p_valid), .in_ready(p_ready), .in_info(p_info),
    .out_valid(h_valid), .out_ready(h_ready), .out_info(h_info), .out_hash(h_hash));

  // internal cache
  logic [HASH_W-1:0] lk_hash, cwa_hash, cia_hash, cib_hash;
  five_tuple_t       lk_tuple;
  logic              lk_hit, cwa_en, cia_en, cib_en;
  logic [1:0]        lk_slot, cwa_slot, cia_slot, cib_slot;
  flow_rec_t         lk_rec, cwa_rec;

  nfqdr_internal_cache #(.HW(HASH_W), .ENTRIES(CACHE_ENTRIES)) u_icache (
    .clk, .rst_n,
    .lk_hash, .lk_tuple, .lk_hit, .lk_slot, .lk_rec,
    .wr_en(cwa_en), .wr_hash(cwa_hash), .wr_slot(cwa_slot), .wr_rec(cwa_rec),
    .inv_a_en(cia_en), .inv_a_hash(cia_hash), .inv_a_slot(cia_slot),
    .inv_b_en(cib_en), .inv_b_hash(cib_hash), .inv_b_slot(cib_slot));

  // arbiter
  logic                  a_req, a_gnt, a_rvalid, b_req, b_gnt, b_rvalid;
  logic [NSLOTS-1:0]     a_we, b_we;
  logic [HASH_W:0]       a_addr, b_addr;
  logic [NSLOTS*QW-1:0]  a_wdata, b_wdata, rdata;
  nfqdr_mem_arbiter #(.MAW(HASH_W + 1)) u_arb (
    .clk, .rst_n,
    .a_req, .a_we, .a_addr, .a_wdata, .a_gnt, .a_rvalid,
    .b_req, .b_we, .b_addr, .b_wdata, .b_gnt, .b_rvalid,
    .rdata, .mem_req, .mem_we, .mem_addr, .mem_wdata, .mem_rvalid, .mem_rdata);

  logic              ea_valid, ea_ready, eb_valid, eb_ready;
  flow_rec_t         ea_rec, eb_rec;
  logic              a_act;
  logic [HASH_W-1:0] a_act_hash;

  nfqdr_flow_lookup #(.HW(HASH_W)) u_lookup (
    .clk, .rst_n, .table_ready(ready),
    .in_valid(h_valid), .in_ready(h_ready), .in_info(h_info), .in_hash(h_hash),
    .lk_hash, .lk_tuple, .lk_hit, .lk_slot, .lk_rec,
    .c_wr_en(cwa_en), .c_wr_hash(cwa_hash), .c_wr_slot(cwa_slot), .c_wr_rec(cwa_rec),
    .c_inv_en(cia_en), .c_inv_hash(cia_hash), .c_inv_slot(cia_slot),
    .m_req(a_req), .m_we(a_we), .m_addr(a_addr), .m_wdata(a_wdata), .m_gnt(a_gnt),
    .m_rvalid(a_rvalid), .m_rdata(rdata),
    .exp_valid(ea_valid), .exp_ready(ea_ready), .exp_rec(ea_rec),
    .act(a_act), .act_hash(a_act_hash),
    .n_created, .n_updated, .n_collisions, .n_fin_rst, .n_cache_hits);

  nfqdr_timeout_monitor #(.HW(HASH_W), .INACTIVE_TIMEOUT(INACTIVE_TIMEOUT),
                          .ACTIVE_TIMEOUT(ACTIVE_TIMEOUT)) u_tmo (
    .clk, .rst_n, .now, .table_ready(ready),
    .m_req(b_req), .m_we(b_we), .m_addr(b_addr), .m_wdata(b_wdata), .m_gnt(b_gnt),
    .m_rvalid(b_rvalid), .m_rdata(rdata),
    .a_act, .a_hash(a_act_hash),
    .c_inv_en(cib_en), .c_inv_hash(cib_hash), .c_inv_slot(cib_slot),
    .exp_valid(eb_valid), .exp_ready(eb_ready), .exp_rec(eb_rec),
    .n_inactive, .n_active, .n_skipped, .n_sweeps);

  export_module #(.NETFLOW_EXPORT_PRESENT(NETFLOW_EXPORT_PRESENT),
                  .FIFO_DEPTH(EXPORT_FIFO_DEPTH)) u_export (
    .clk, .rst_n,
    .a_valid(ea_valid), .a_ready(ea_ready), .a_rec(ea_rec),
    .b_valid(eb_valid), .b_ready(eb_ready), .b_rec(eb_rec),
    .m_tdata, .m_tkeep, .m_tvalid, .m_tready, .m_tlast, .n_exported);
endmodule
