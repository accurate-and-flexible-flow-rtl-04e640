// export_module: export stage of the flow cache.
//
// Collects the flow records removed from the flow table, by Process A
// (FIN/RST) and by Process B (timeouts), into a FIFO and sends them out of
// the cache on a 64-bit AXI4-Stream master, first byte in tdata[7:0].
// Process A has priority when both offer a record in the same cycle.
// Two output formats, chosen by NETFLOW_EXPORT_PRESENT:
//   1: each record is a 30-byte packet (4 beats, tkeep 8'h3F on the last),
//      fields in flow_rec_t order, big-endian, for a NetFlow export engine;
//   0: each record is its own Ethernet frame for a 10G port: destination
//      MAC, source MAC, EtherType ETH_TYPE, the 30 record bytes and zero
//      padding to the 60-byte minimum (8 beats, tkeep 8'h0F on the last).
// The two formats and the FIFO follow the document; the byte layout, the
// FIFO depth, the priority and the MAC/EtherType values are this design's.
module export_module
  import flow_pkg::*;
#(
  parameter bit          NETFLOW_EXPORT_PRESENT = 1'b1,
  parameter int unsigned FIFO_DEPTH = 64,
  parameter logic [47:0] DST_MAC  = 48'hFFFF_FFFF_FFFF,
  parameter logic [47:0] SRC_MAC  = 48'h0002_0000_0001,
  parameter logic [15:0] ETH_TYPE = 16'h88B5
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        a_valid,
  output logic        a_ready,
  input  flow_rec_t   a_rec,
  input  logic        b_valid,
  output logic        b_ready,
  input  flow_rec_t   b_rec,
  output logic [63:0] m_tdata,
  output logic [7:0]  m_tkeep,
  output logic        m_tvalid,
  input  logic        m_tready,
  output logic        m_tlast,
  output logic [31:0] n_exported
);
  localparam int unsigned FRAME_BYTES = NETFLOW_EXPORT_PRESENT ? REC_BYTES : 60;
  localparam int unsigned BEATS       = (FRAME_BYTES + 7) / 8;
  localparam int unsigned LAST_BYTES  = FRAME_BYTES - 8 * (BEATS - 1);

  logic      f_in_valid, f_in_ready, f_out_valid, f_out_ready;
  flow_rec_t f_in, f_out;

  assign f_in_valid = a_valid || b_valid;
  assign f_in       = a_valid ? a_rec : b_rec;
  assign a_ready    = f_in_ready;
  assign b_ready    = f_in_ready && !a_valid;

  sync_fifo #(.WIDTH(REC_W), .DEPTH(FIFO_DEPTH)) u_fifo (
    .clk, .rst_n,
    .in_valid(f_in_valid), .in_ready(f_in_ready), .in_data(f_in),
    .out_valid(f_out_valid), .out_ready(f_out_ready), .out_data(f_out),
    .count()
  );

  // Frame bytes of the record at the FIFO head.
  logic [7:0] fbyte [64];
  always_comb begin
    for (int k = 0; k < 64; k++) fbyte[k] = 8'h00;
    if (NETFLOW_EXPORT_PRESENT) begin
      for (int k = 0; k < REC_BYTES; k++) fbyte[k] = rec_byte(f_out, k);
    end else begin
      for (int k = 0; k < 6; k++) begin
        fbyte[k]     = DST_MAC[47-8*k -: 8];
        fbyte[6 + k] = SRC_MAC[47-8*k -: 8];
      end
      fbyte[12] = ETH_TYPE[15:8];
      fbyte[13] = ETH_TYPE[7:0];
      for (int k = 0; k < REC_BYTES; k++) fbyte[14 + k] = rec_byte(f_out, k);
    end
  end

  logic [2:0] beat;
  always_comb begin
    for (int l = 0; l < 8; l++) m_tdata[8*l +: 8] = fbyte[{beat, 3'(l)}];
  end
  assign m_tvalid    = f_out_valid;
  assign m_tlast     = (beat == 3'(BEATS - 1));
  assign m_tkeep     = m_tlast ? 8'((1 << LAST_BYTES) - 1) : 8'hFF;
  assign f_out_ready = m_tvalid && m_tready && m_tlast;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      beat <= '0;
      n_exported <= '0;
    end else if (m_tvalid && m_tready) begin
      if (m_tlast) begin
        beat <= '0;
        n_exported <= n_exported + 1'b1;
      end else begin
        beat <= beat + 1'b1;
      end
    end
  end

`ifndef SYNTHESIS
  a_axis_hold: assert property (@(posedge clk) disable iff (!rst_n)
    m_tvalid && !m_tready |=> m_tvalid && $stable(m_tdata) && $stable(m_tlast));
`endif
endmodule
