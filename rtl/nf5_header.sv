// nf5_header: NetFlow v5 packet header stage of the export engine.
//
// On start (the batch of PDUs is complete) it registers the 24-byte
// NetFlow v5 header: version 5, PDU count, SysUptime in ms, unix seconds
// and nanoseconds, the flow sequence number (flows sent before this
// packet), engine type/id ENGINE_TYPE/ENGINE_ID and sampling interval 0
// (every packet is counted). It adds the header's 16-bit words to the
// partial UDP checksum of the PDUs and raises done one cycle after start;
// outputs hold until the next start. The header layout is the public
// NetFlow v5 format; engine values are this design's defaults.
module nf5_header #(
  parameter logic [7:0] ENGINE_TYPE = 8'd0,
  parameter logic [7:0] ENGINE_ID   = 8'd0
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         start,
  input  logic [7:0]   count,
  input  logic [31:0]  pdu_sum,
  input  logic [31:0]  uptime_ms,
  input  logic [31:0]  unix_secs,
  input  logic [31:0]  unix_nsecs,
  output logic         done,
  output logic [191:0] hdr,        // byte 0 in [191:184]
  output logic [31:0]  sum
);
  logic [31:0]  seq;
  logic [191:0] h;
  logic [31:0]  hs;

  always_comb begin
    h = {16'd5, 8'd0, count, uptime_ms, unix_secs, unix_nsecs, seq,
         ENGINE_TYPE, ENGINE_ID, 16'd0};
    hs = pdu_sum;
    for (int j = 0; j < 12; j++) hs = hs + {16'd0, h[191-16*j -: 16]};
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      seq <= '0; done <= 1'b0; hdr <= '0; sum <= '0;
    end else begin
      done <= start;
      if (start) begin
        hdr <= h;
        sum <= hs;
        seq <= seq + {24'd0, count};
      end
    end
  end
endmodule
