// udp_header: UDP header stage of the export engine.
//
// On start (NetFlow v5 header ready) it registers the 8-byte UDP header:
// ports SRC_PORT/DST_PORT, length 8 + payload bytes, and the checksum,
// the one's complement of the folded sum of the payload's partial sum, the
// IPv4 pseudo-header (addresses, protocol 17, UDP length) and the header
// itself; a result of zero is sent as 0xFFFF. done rises one cycle after
// start. The port numbers are this design's defaults.
module udp_header
  import csum_pkg::*;
#(
  parameter logic [31:0] SRC_IP   = 32'hC0A8_0001,
  parameter logic [31:0] DST_IP   = 32'hC0A8_0002,
  parameter logic [15:0] SRC_PORT = 16'd2055,
  parameter logic [15:0] DST_PORT = 16'd2055
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        start,
  input  logic [15:0] payload_len,
  input  logic [31:0] payload_sum,
  output logic        done,
  output logic [63:0] hdr,           // byte 0 in [63:56]
  output logic [15:0] udp_len
);
  logic [15:0] len, ck;
  logic [31:0] s;
  always_comb begin
    len = payload_len + 16'd8;
    s = payload_sum
      + {16'd0, SRC_IP[31:16]} + {16'd0, SRC_IP[15:0]}
      + {16'd0, DST_IP[31:16]} + {16'd0, DST_IP[15:0]}
      + 32'd17 + {16'd0, len}
      + {16'd0, SRC_PORT} + {16'd0, DST_PORT} + {16'd0, len};
    ck = ~fold16(s);
    if (ck == 16'h0000) ck = 16'hFFFF;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      done <= 1'b0; hdr <= '0; udp_len <= '0;
    end else begin
      done <= start;
      if (start) begin
        hdr     <= {SRC_PORT, DST_PORT, len, ck};
        udp_len <= len;
      end
    end
  end
endmodule
