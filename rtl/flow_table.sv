// flow_table: the flow cache's table of active flows, a true dual-port RAM.
//
// DEPTH words of ENTRY_W bits; each word holds one complete flow entry
// (busy flag, 5-tuple, TCP flags, first and last timestamp, packet and byte
// counters), so a flow is read or written in a single access. Port A serves
// flow creation and update, port B the timeout monitor; the two ports are
// independent and each has a one-cycle synchronous read. A read and a write
// to the same address on different ports in the same cycle return the old
// word; avoiding such collisions is the job of the two clients. Contents are
// cleared to zero (all entries free) by a sweep after reset, during which
// init_done stays low; this sweep is this design's choice, an FPGA would get
// the same from the BRAM initial value.
module flow_table
  import flow_pkg::*;
#(
  parameter int unsigned DEPTH = 16384,
  parameter int unsigned AW    = $clog2(DEPTH)
) (
  input  logic              clk,
  input  logic              rst_n,
  output logic              init_done,
  // port A
  input  logic              a_en,
  input  logic              a_we,
  input  logic [AW-1:0]     a_addr,
  input  flow_entry_t       a_wdata,
  output flow_entry_t       a_rdata,
  // port B
  input  logic              b_en,
  input  logic              b_we,
  input  logic [AW-1:0]     b_addr,
  input  flow_entry_t       b_wdata,
  output flow_entry_t       b_rdata
);
  flow_entry_t mem [DEPTH];
  logic [AW-1:0] init_addr;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      init_done <= 1'b0;
      init_addr <= '0;
    end else if (!init_done) begin
      init_addr <= init_addr + 1'b1;
      if (init_addr == AW'(DEPTH - 1)) init_done <= 1'b1;
    end
  end

  // Both ports in one process so that the array has a single driver.
  always_ff @(posedge clk) begin
    if (!init_done) begin
      mem[init_addr] <= '0;
    end else begin
      if (a_en && a_we) mem[a_addr] <= a_wdata;
      if (b_en && b_we) mem[b_addr] <= b_wdata;
    end
    if (a_en) a_rdata <= mem[a_addr];
    if (b_en) b_rdata <= mem[b_addr];
  end
endmodule
