// frame_mem: Ethernet frame data memory of the export engine.
//
// Simple dual-port RAM as wide as the AXI4-Stream data bus: port A writes
// with per-byte enables (the general control process), port B reads with
// one cycle of latency (the frame sender). DEPTH words must hold the
// largest NetFlow v5 frame, 1506 bytes = 189 words for 30 PDUs.
module frame_mem #(
  parameter int unsigned DEPTH = 256,
  parameter int unsigned AW    = $clog2(DEPTH)
) (
  input  logic          clk,
  input  logic          we,
  input  logic [7:0]    be,
  input  logic [AW-1:0] waddr,
  input  logic [63:0]   wdata,
  input  logic [AW-1:0] raddr,
  output logic [63:0]   rdata
);
  logic [63:0] mem [DEPTH];
  always_ff @(posedge clk) begin
    if (we)
      for (int l = 0; l < 8; l++)
        if (be[l]) mem[waddr][8*l +: 8] <= wdata[8*l +: 8];
    rdata <= mem[raddr];
  end
endmodule
