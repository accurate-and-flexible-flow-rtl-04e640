// ip_header: IPv4 header stage of the export engine.
//
// On start (UDP header ready) it registers a 20-byte IPv4 header without
// options: version 4, IHL 5, ToS 0, total length 20 + UDP length, an
// identification that increments per packet, Don't Fragment set, TTL
// TTL, protocol 17 (UDP), the header checksum and the two addresses.
// done rises one cycle after start. Addresses, TTL and the DF flag are
// this design's defaults.
module ip_header
  import csum_pkg::*;
#(
  parameter logic [31:0] SRC_IP = 32'hC0A8_0001,
  parameter logic [31:0] DST_IP = 32'hC0A8_0002,
  parameter logic [7:0]  TTL    = 8'd64
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         start,
  input  logic [15:0]  udp_len,
  output logic         done,
  output logic [159:0] hdr            // byte 0 in [159:152]
);
  logic [15:0]  id;
  logic [159:0] h;
  logic [31:0]  s;
  always_comb begin
    h = {8'h45, 8'h00, udp_len + 16'd20, id, 16'h4000, TTL, 8'd17, 16'h0000, SRC_IP, DST_IP};
    s = 32'd0;
    for (int j = 0; j < 10; j++) s = s + {16'd0, h[159-16*j -: 16]};
    h[79:64] = ~fold16(s);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      done <= 1'b0; hdr <= '0; id <= '0;
    end else begin
      done <= start;
      if (start) begin
        hdr <= h;
        id  <= id + 1'b1;
      end
    end
  end
endmodule
