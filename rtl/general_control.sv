// general_control: general control process of the NetFlow v5 export engine.
//
// Builds one Ethernet frame at a time in the frame memory, byte k of the
// frame in lane k%8 of word k/8. When the flow encoder reports a complete
// batch (enc_ready) and the previous frame has been sent, it acknowledges
// the encoder, starts the header chain (NetFlow v5 -> UDP -> IPv4), and
// copies the batch's 6*count PDU words out of the PDU FIFO to bytes
// 66 onwards: the headers take 66 bytes (Ethernet 14, IPv4 20, UDP 8,
// NetFlow v5 24), so each FIFO word is written shifted by two byte lanes,
// with its last two bytes carried into the next word and byte enables
// masking the first and the flushed last write. It then writes the 66
// header bytes to words 0..8 and starts the frame sender with the last word
// index and its tkeep, and waits for pkt_sent before the next batch. The
// Ethernet header uses DST_MAC, SRC_MAC and EtherType 0x0800. Copy takes
// one cycle per word while the FIFO has data; headers take nine cycles.
module general_control #(
  parameter logic [47:0] DST_MAC = 48'h0002_0000_0002,
  parameter logic [47:0] SRC_MAC = 48'h0002_0000_0001,
  parameter int unsigned AW      = 8
) (
  input  logic          clk,
  input  logic          rst_n,
  // flow encoder
  input  logic          enc_ready,
  input  logic [7:0]    enc_count,
  output logic          enc_ack,
  // PDU FIFO read side
  input  logic          f_valid,
  output logic          f_ready,
  input  logic [63:0]   f_data,
  // header chain
  output logic          hdr_start,
  input  logic          ip_done,
  input  logic [191:0]  nf5_hdr,
  input  logic [63:0]   udp_hdr,
  input  logic [159:0]  ip_hdr,
  // frame memory write port
  output logic          m_we,
  output logic [7:0]    m_be,
  output logic [AW-1:0] m_addr,
  output logic [63:0]   m_wdata,
  // frame sender
  output logic          send_start,
  output logic [AW-1:0] send_last,
  output logic [7:0]    send_keep,
  input  logic          pkt_sent
);
  localparam int unsigned HDR_BYTES = 66;
  typedef enum logic [2:0] {S_IDLE, S_COPY, S_FLUSH, S_HDR, S_SEND, S_WAIT} state_t;
  state_t        state;
  logic [8:0]    words_left;
  logic [AW-1:0] waddr;
  logic [15:0]   carry;
  logic          first;
  logic          hdr_ok;
  logic [3:0]    hword;
  logic [15:0]   frame_len;
  logic [7:0]    count;

  logic [7:0] hb [72];
  always_comb begin
    logic [527:0] hv;
    hv = {DST_MAC, SRC_MAC, 16'h0800, ip_hdr, udp_hdr, nf5_hdr};
    for (int k = 0; k < 72; k++) hb[k] = 8'h00;
    for (int k = 0; k < HDR_BYTES; k++) hb[k] = hv[527-8*k -: 8];
  end

  assign f_ready   = (state == S_COPY);
  assign enc_ack   = (state == S_IDLE) && enc_ready;
  assign hdr_start = enc_ack;
  assign frame_len = 16'(HDR_BYTES) + 16'd48 * {8'd0, count};

  always_comb begin
    m_we = 1'b0; m_be = 8'h00; m_addr = waddr; m_wdata = '0;
    case (state)
      S_COPY: if (f_valid) begin
        m_we    = 1'b1;
        m_be    = first ? 8'hFC : 8'hFF;
        m_wdata = {f_data[47:0], carry};
      end
      S_FLUSH: begin
        m_we = 1'b1; m_be = 8'h03; m_wdata = {48'd0, carry};
      end
      S_HDR: if (hdr_ok) begin
        m_we   = 1'b1;
        m_addr = AW'(hword);
        m_be   = (hword == 4'd8) ? 8'h03 : 8'hFF;
        for (int l = 0; l < 8; l++) m_wdata[8*l +: 8] = hb[{hword, 3'(l)}];
      end
      default: ;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE; words_left <= '0; waddr <= '0; carry <= '0; first <= 1'b0;
      hdr_ok <= 1'b0; hword <= '0; count <= '0;
      send_start <= 1'b0; send_last <= '0; send_keep <= '0;
    end else begin
      send_start <= 1'b0;
      if (ip_done) hdr_ok <= 1'b1;
      case (state)
        S_IDLE: if (enc_ready) begin
          count      <= enc_count;
          words_left <= 9'd6 * {1'b0, enc_count};
          waddr      <= AW'(HDR_BYTES / 8);
          carry      <= '0;
          first      <= 1'b1;
          hdr_ok     <= 1'b0;
          state      <= (enc_count == 8'd0) ? S_IDLE : S_COPY;
        end
        S_COPY: if (f_valid) begin
          carry <= f_data[63:48];
          first <= 1'b0;
          waddr <= waddr + 1'b1;
          words_left <= words_left - 1'b1;
          if (words_left == 9'd1) state <= S_FLUSH;
        end
        S_FLUSH: begin
          hword <= '0;
          state <= S_HDR;
        end
        S_HDR: if (hdr_ok) begin
          hword <= hword + 1'b1;
          if (hword == 4'd8) state <= S_SEND;
        end
        S_SEND: begin
          send_start <= 1'b1;
          send_last  <= AW'((frame_len - 16'd1) >> 3);
          send_keep  <= 8'((16'd1 << (frame_len - ((frame_len - 16'd1) & ~16'd7))) - 16'd1);
          state      <= S_WAIT;
        end
        S_WAIT: if (pkt_sent) state <= S_IDLE;
        default: state <= S_IDLE;
      endcase
    end
  end
endmodule
