// netflow_export: NetFlow v5 export engine.
//
// Receives the flow records exported by the flow cache (64-bit AXI4-Stream
// slave) and sends them to a collector as NetFlow v5 over UDP/IPv4/Ethernet
// (64-bit AXI4-Stream master towards a 10G MAC). The flow encoder turns each
// record into a 48-byte PDU in the PDU FIFO; when N_FLOWS PDUs are there, or
// at least one has waited WAIT_MS ms, the general control process copies
// them into the frame memory behind 66 header bytes made by the NetFlow v5,
// UDP and IPv4 header stages (each fed the running partial UDP checksum of
// the one before), and the frame sender streams the frame out. The PDU FIFO
// lets the next batch be encoded while the previous frame is being sent.
// Structure, N = 30 and the one-minute wait follow the document; addresses,
// ports, FIFO depth and field values it leaves open are parameters here.
module netflow_export #(
  parameter int unsigned N_FLOWS        = 30,
  parameter int unsigned WAIT_MS        = 60_000,
  parameter int unsigned CYCLES_PER_MS  = 200_000,
  parameter int unsigned PDU_FIFO_DEPTH = 256,
  parameter int unsigned FRAME_DEPTH    = 256,
  parameter logic [47:0] DST_MAC  = 48'h0002_0000_0002,
  parameter logic [47:0] SRC_MAC  = 48'h0002_0000_0001,
  parameter logic [31:0] SRC_IP   = 32'hC0A8_0001,
  parameter logic [31:0] DST_IP   = 32'hC0A8_0002,
  parameter logic [15:0] SRC_PORT = 16'd2055,
  parameter logic [15:0] DST_PORT = 16'd2055
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic [63:0] s_tdata,
  input  logic [7:0]  s_tkeep,
  input  logic        s_tvalid,
  output logic        s_tready,
  input  logic        s_tlast,
  output logic [63:0] m_tdata,
  output logic [7:0]  m_tkeep,
  output logic        m_tvalid,
  input  logic        m_tready,
  output logic        m_tlast,
  output logic [31:0] n_frames
);
  localparam int unsigned AW = $clog2(FRAME_DEPTH);

  logic [31:0] uptime_ms, unix_secs, unix_nsecs;
  logic        ms_tick;
  sys_time_gen #(.CYCLES_PER_MS(CYCLES_PER_MS)) u_time (
    .clk, .rst_n, .uptime_ms, .unix_secs, .unix_nsecs, .ms_tick);

  logic        fw_valid, fw_ready, fr_valid, fr_ready;
  logic [63:0] fw_data, fr_data;
  logic        enc_ready, enc_ack;
  logic [7:0]  enc_count;
  logic [31:0] enc_sum;

  flow_encoding #(.N_FLOWS(N_FLOWS), .WAIT_MS(WAIT_MS)) u_enc (
    .clk, .rst_n, .ms_tick,
    .s_tdata, .s_tkeep, .s_tvalid, .s_tready, .s_tlast,
    .f_valid(fw_valid), .f_ready(fw_ready), .f_data(fw_data),
    .enc_ready, .enc_count, .enc_sum, .enc_ack);

  sync_fifo #(.WIDTH(64), .DEPTH(PDU_FIFO_DEPTH)) u_pdu_fifo (
    .clk, .rst_n,
    .in_valid(fw_valid), .in_ready(fw_ready), .in_data(fw_data),
    .out_valid(fr_valid), .out_ready(fr_ready), .out_data(fr_data), .count());

  logic         hdr_start, nf5_done, udp_done, ip_done;
  logic [191:0] nf5_hdr;
  logic [31:0]  nf5_sum;
  logic [63:0]  udp_hdr;
  logic [15:0]  udp_len;
  logic [159:0] ip_hdr;

  nf5_header u_nf5 (
    .clk, .rst_n, .start(hdr_start), .count(enc_count), .pdu_sum(enc_sum),
    .uptime_ms, .unix_secs, .unix_nsecs, .done(nf5_done), .hdr(nf5_hdr), .sum(nf5_sum));

  logic [7:0]  cnt_q;
  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) cnt_q <= '0;
    else if (hdr_start) cnt_q <= enc_count;

  udp_header #(.SRC_IP(SRC_IP), .DST_IP(DST_IP), .SRC_PORT(SRC_PORT), .DST_PORT(DST_PORT)) u_udp (
    .clk, .rst_n, .start(nf5_done), .payload_len(16'd24 + 16'd48 * {8'd0, cnt_q}),
    .payload_sum(nf5_sum), .done(udp_done), .hdr(udp_hdr), .udp_len);

  ip_header #(.SRC_IP(SRC_IP), .DST_IP(DST_IP)) u_ip (
    .clk, .rst_n, .start(udp_done), .udp_len, .done(ip_done), .hdr(ip_hdr));

  logic          m_we, send_start, pkt_sent;
  logic [7:0]    m_be, send_keep;
  logic [AW-1:0] m_addr, send_last, raddr;
  logic [63:0]   m_wdata, rdata;

  general_control #(.DST_MAC(DST_MAC), .SRC_MAC(SRC_MAC), .AW(AW)) u_gcp (
    .clk, .rst_n, .enc_ready, .enc_count, .enc_ack,
    .f_valid(fr_valid), .f_ready(fr_ready), .f_data(fr_data),
    .hdr_start, .ip_done, .nf5_hdr, .udp_hdr, .ip_hdr,
    .m_we, .m_be, .m_addr, .m_wdata,
    .send_start, .send_last, .send_keep, .pkt_sent);

  frame_mem #(.DEPTH(FRAME_DEPTH)) u_mem (
    .clk, .we(m_we), .be(m_be), .waddr(m_addr), .wdata(m_wdata), .raddr, .rdata);

  frame_sender #(.AW(AW)) u_send (
    .clk, .rst_n, .send_start, .last(send_last), .last_keep(send_keep),
    .raddr, .rdata, .m_tdata, .m_tkeep, .m_tvalid, .m_tready, .m_tlast,
    .pkt_sent, .n_frames);
endmodule
