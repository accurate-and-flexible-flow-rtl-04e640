// nfqdr_mem_arbiter: Main Memory Arbiter of the external-memory flow cache.
//
// The QDR-II memories have one port, so the flow look-up (Process A) and the
// timeout monitor (Process B) share it. Each cycle at most one operation is
// issued, to the same address in all three slot modules: a read returns the
// three slots, a write carries a per-slot write enable. Process A always
// wins, so that flow creation and update keep a good response time, and
// Process B is granted only in cycles A does not request and may
// have at most B_MAX_PENDING reads outstanding. The memory returns reads in
// order after a fixed latency; a small queue of owner bits routes each
// returned read to A or B (a_rvalid / b_rvalid, shared rdata).
// Interface: requests are valid/grant (gnt in the same cycle, combinational);
// the memory side is the user side of a memory controller (req, we per slot,
// addr, wdata per slot, rvalid, rdata per slot). The controller itself is not
// part of this design.
module nfqdr_mem_arbiter
  import qdr_pkg::*;
#(
  parameter int unsigned MAW           = 19,
  parameter int unsigned B_MAX_PENDING = 2,
  parameter int unsigned MAX_READS     = 16
) (
  input  logic                  clk,
  input  logic                  rst_n,
  // Process A
  input  logic                  a_req,
  input  logic [NSLOTS-1:0]     a_we,
  input  logic [MAW-1:0]        a_addr,
  input  logic [NSLOTS*QW-1:0]  a_wdata,
  output logic                  a_gnt,
  output logic                  a_rvalid,
  // Process B
  input  logic                  b_req,
  input  logic [NSLOTS-1:0]     b_we,
  input  logic [MAW-1:0]        b_addr,
  input  logic [NSLOTS*QW-1:0]  b_wdata,
  output logic                  b_gnt,
  output logic                  b_rvalid,
  // read data for whichever rvalid is high
  output logic [NSLOTS*QW-1:0]  rdata,
  // memory controller user side
  output logic                  mem_req,
  output logic [NSLOTS-1:0]     mem_we,
  output logic [MAW-1:0]        mem_addr,
  output logic [NSLOTS*QW-1:0]  mem_wdata,
  input  logic                  mem_rvalid,
  input  logic [NSLOTS*QW-1:0]  mem_rdata
);
  localparam int unsigned CW = $clog2(MAX_READS + 1);
  localparam int unsigned OW = $clog2(MAX_READS);
  logic [MAX_READS-1:0] owner;     // 1 = B, oldest read in bit 0
  logic [CW-1:0]        n_out;
  logic [CW-1:0]        b_pend;
  logic                 push, pop, b_ok;

  assign b_ok  = (b_pend < CW'(B_MAX_PENDING)) || (b_we != '0);
  assign a_gnt = a_req && (n_out < CW'(MAX_READS) || a_we != '0);
  assign b_gnt = b_req && !a_req && b_ok && (n_out < CW'(MAX_READS) || b_we != '0);

  always_comb begin
    mem_req   = a_gnt || b_gnt;
    mem_we    = a_gnt ? a_we : b_we;
    mem_addr  = a_gnt ? a_addr : b_addr;
    mem_wdata = a_gnt ? a_wdata : b_wdata;
    if (!mem_req) mem_we = '0;
  end

  assign push     = mem_req && (mem_we == '0);
  assign pop      = mem_rvalid;
  assign rdata    = mem_rdata;
  assign a_rvalid = mem_rvalid && !owner[0];
  assign b_rvalid = mem_rvalid && owner[0];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      owner <= '0; n_out <= '0; b_pend <= '0;
    end else begin
      logic [MAX_READS-1:0] o;
      logic [CW-1:0]        n;
      o = owner; n = n_out;
      if (pop) begin o = o >> 1; n = n - 1'b1; end
      if (push) begin o[OW'(n)] = b_gnt; n = n + 1'b1; end
      owner <= o;
      n_out <= n;
      b_pend <= b_pend + CW'(push && b_gnt) - CW'(pop && owner[0]);
    end
  end

`ifndef SYNTHESIS
  a_no_underflow: assert property (@(posedge clk) disable iff (!rst_n) mem_rvalid |-> n_out != '0);
`endif
endmodule
