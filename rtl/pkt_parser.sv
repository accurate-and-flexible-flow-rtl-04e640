// pkt_parser: packet parser (packet classification) of the flow cache.
//
// Receives Ethernet frames from the 10G MAC user interface, a 64-bit
// AXI4-Stream slave with byte 0 of the frame in tdata[7:0], tkeep marking
// valid bytes and tuser asserted with tlast when the MAC found a bad FCS.
// The MAC cannot be stalled, so tready is always high. Fields are picked
// from the byte stream by byte index: EtherType (bytes 12-13), IPv4
// version/IHL (14), Total Length (16-17), protocol (23), source and
// destination addresses (26-33), and, at offset 14+4*IHL, the source and
// destination ports and the TCP flags byte (L4 offset + 13). The timestamp
// is sampled on the first beat of the frame. At tlast, a frame that is
// IPv4, TCP or UDP, long enough to hold its ports (and flags for TCP) and
// without FCS error yields one pkt_info_t on the output (valid/ready, one
// register). Everything else is discarded and counted in rejected. If the
// previous result has not been taken when the next is ready, the new one is
// dropped and counted in dropped. The byte count is the IP Total Length.
// Untagged Ethernet II framing is assumed (no VLAN tag).
module pkt_parser
  import flow_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic [TS_W-1:0] now,
  // AXI4-Stream slave from the MAC
  input  logic [63:0] s_tdata,
  input  logic [7:0]  s_tkeep,
  input  logic        s_tvalid,
  output logic        s_tready,
  input  logic        s_tlast,
  input  logic        s_tuser,
  // parsed packet information
  output logic        out_valid,
  input  logic        out_ready,
  output pkt_info_t   out_info,
  output logic [31:0] accepted,
  output logic [31:0] rejected,
  output logic [31:0] dropped
);
  assign s_tready = 1'b1;

  logic [7:0]  beat;          // saturating beat index within the frame
  logic [15:0] ethertype;
  logic [3:0]  ver, ihl;
  logic [15:0] tot_len;
  logic [7:0]  proto;
  logic [31:0] sip, dip;
  logic [15:0] sport, dport;
  logic [7:0]  flags;
  logic        have_ports, have_flags;
  logic [TS_W-1:0] sof_ts;

  // Next-state values of the field registers, with the current beat merged in.
  logic [15:0] n_ethertype, n_tot_len, n_sport, n_dport;
  logic [3:0]  n_ver, n_ihl;
  logic [7:0]  n_proto, n_flags;
  logic [31:0] n_sip, n_dip;
  logic        n_have_ports, n_have_flags;
  logic [10:0] l4;
  logic        frame_ok;

  always_comb begin
    logic [10:0] idx;
    logic [7:0]  b;
    n_ethertype = ethertype; n_tot_len = tot_len; n_sport = sport; n_dport = dport;
    n_ver = ver; n_ihl = ihl; n_proto = proto; n_flags = flags; n_sip = sip; n_dip = dip;
    n_have_ports = have_ports; n_have_flags = have_flags;
    if (beat == 8'd0) begin
      n_ihl = 4'd5; n_have_ports = 1'b0; n_have_flags = 1'b0;
    end
    l4 = 11'd14 + {5'd0, ihl, 2'b00};
    for (int lane = 0; lane < 8; lane++) begin
      idx = {beat, 3'b000} + 11'(lane);
      b   = s_tdata[8*lane +: 8];
      if (s_tkeep[lane]) begin
        case (idx)
          11'd12: n_ethertype[15:8] = b;
          11'd13: n_ethertype[7:0]  = b;
          11'd14: begin n_ver = b[7:4]; n_ihl = b[3:0]; end
          11'd16: n_tot_len[15:8] = b;
          11'd17: n_tot_len[7:0]  = b;
          11'd23: n_proto = b;
          11'd26: n_sip[31:24] = b;
          11'd27: n_sip[23:16] = b;
          11'd28: n_sip[15:8]  = b;
          11'd29: n_sip[7:0]   = b;
          11'd30: n_dip[31:24] = b;
          11'd31: n_dip[23:16] = b;
          11'd32: n_dip[15:8]  = b;
          11'd33: n_dip[7:0]   = b;
          default: ;
        endcase
        // L4 fields lie at or beyond byte 34, after IHL is known (byte 14).
        if (beat >= 8'd4) begin
          if (idx == l4)          n_sport[15:8] = b;
          if (idx == l4 + 11'd1)  n_sport[7:0]  = b;
          if (idx == l4 + 11'd2)  n_dport[15:8] = b;
          if (idx == l4 + 11'd3)  begin n_dport[7:0] = b; n_have_ports = 1'b1; end
          if (idx == l4 + 11'd13) begin n_flags = b; n_have_flags = 1'b1; end
        end
      end
    end
    frame_ok = (n_ethertype == 16'h0800) && (n_ver == 4'd4) && (n_ihl >= 4'd5) && !s_tuser &&
               (((n_proto == PROTO_TCP) && n_have_flags) ||
                ((n_proto == PROTO_UDP) && n_have_ports));
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      beat <= '0;
      ethertype <= '0; tot_len <= '0; sport <= '0; dport <= '0;
      ver <= '0; ihl <= 4'd5; proto <= '0; flags <= '0; sip <= '0; dip <= '0;
      have_ports <= 1'b0; have_flags <= 1'b0; sof_ts <= '0;
      out_valid <= 1'b0; out_info <= '0;
      accepted <= '0; rejected <= '0; dropped <= '0;
    end else begin
      if (out_valid && out_ready) out_valid <= 1'b0;
      if (s_tvalid) begin
        ethertype <= n_ethertype; tot_len <= n_tot_len; sport <= n_sport; dport <= n_dport;
        ver <= n_ver; ihl <= n_ihl; proto <= n_proto; flags <= n_flags; sip <= n_sip; dip <= n_dip;
        have_ports <= n_have_ports; have_flags <= n_have_flags;
        if (beat == 8'd0) sof_ts <= now;
        if (s_tlast) begin
          beat <= '0;
          if (!frame_ok) begin
            rejected <= rejected + 1'b1;
          end else if (out_valid && !out_ready) begin
            dropped <= dropped + 1'b1;
          end else begin
            accepted <= accepted + 1'b1;
            out_valid <= 1'b1;
            out_info.tuple     <= '{src_ip: n_sip, dst_ip: n_dip, src_port: n_sport,
                                    dst_port: n_dport, proto: n_proto};
            out_info.tcp_flags <= (n_proto == PROTO_TCP) ? n_flags : 8'h00;
            out_info.ts        <= (beat == 8'd0) ? now : sof_ts;
            out_info.bytes     <= n_tot_len;
          end
        end else if (beat != 8'hFF) begin
          beat <= beat + 1'b1;
        end
      end
    end
  end
endmodule
