// flow_encoding: first stage of the NetFlow v5 export engine.
//
// Takes flow records from the flow cache on a 64-bit AXI4-Stream slave
// (30-byte packets, first byte in tdata[7:0]; see flow_pkg) and rewrites
// each as a 48-byte NetFlow v5 flow record (PDU), pushed as six 64-bit
// words into the PDU FIFO, byte 0 of the PDU in bits [7:0] of the first
// word. While the words go out it adds their 16-bit big-endian words into a
// running one's-complement partial UDP checksum. A batch is closed when it
// holds N_FLOWS PDUs, or when it holds at least one and WAIT_MS milliseconds
// have passed since its first PDU; enc_ready is then raised with the PDU
// count and the partial sum, input is held off, and everything restarts on
// enc_ack from the general control process. The input is stalled for six
// cycles per record while its PDU is written. PDU fields not known to the
// flow cache (next hop, interfaces, ToS, AS numbers, masks) are zero.
module flow_encoding
  import flow_pkg::*;
#(
  parameter int unsigned N_FLOWS = 30,
  parameter int unsigned WAIT_MS = 60_000
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        ms_tick,
  // records from the flow cache
  input  logic [63:0] s_tdata,
  input  logic [7:0]  s_tkeep,
  input  logic        s_tvalid,
  output logic        s_tready,
  input  logic        s_tlast,
  // PDU FIFO write side
  output logic        f_valid,
  input  logic        f_ready,
  output logic [63:0] f_data,
  // to the general control process and the NetFlow v5 header
  output logic        enc_ready,
  output logic [7:0]  enc_count,
  output logic [31:0] enc_sum,
  input  logic        enc_ack
);
  typedef enum logic [1:0] {S_RECV, S_PUSH, S_DONE} state_t;
  state_t      state;
  logic [7:0]  rbytes [REC_BYTES];
  logic [2:0]  beat;
  logic [2:0]  word;
  logic [31:0] timer;
  flow_rec_t   rec;
  logic [7:0]  pdu [48];

  always_comb begin
    logic [REC_W-1:0] v;
    for (int k = 0; k < REC_BYTES; k++) v[REC_W-1-8*k -: 8] = rbytes[k];
    rec = flow_rec_t'(v);
    for (int k = 0; k < 48; k++) pdu[k] = 8'h00;
    for (int k = 0; k < 4; k++) begin
      pdu[0+k]  = rec.tuple.src_ip[31-8*k -: 8];
      pdu[4+k]  = rec.tuple.dst_ip[31-8*k -: 8];
      pdu[16+k] = rec.pkts[31-8*k -: 8];
      pdu[20+k] = rec.bytes[31-8*k -: 8];
      pdu[24+k] = rec.first_ts[31-8*k -: 8];
      pdu[28+k] = rec.last_ts[31-8*k -: 8];
    end
    pdu[32] = rec.tuple.src_port[15:8];
    pdu[33] = rec.tuple.src_port[7:0];
    pdu[34] = rec.tuple.dst_port[15:8];
    pdu[35] = rec.tuple.dst_port[7:0];
    pdu[37] = rec.tcp_flags;
    pdu[38] = rec.tuple.proto;
    for (int l = 0; l < 8; l++) f_data[8*l +: 8] = pdu[{word, 3'(l)}];
  end

  assign s_tready  = (state == S_RECV);
  assign f_valid   = (state == S_PUSH);
  assign enc_ready = (state == S_DONE);

  logic [31:0] word_sum;
  always_comb begin
    word_sum = 32'd0;
    for (int j = 0; j < 4; j++)
      word_sum = word_sum + {16'd0, f_data[16*j +: 8], f_data[16*j+8 +: 8]};
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_RECV;
      beat <= '0; word <= '0; timer <= '0;
      enc_count <= '0; enc_sum <= '0;
      for (int k = 0; k < REC_BYTES; k++) rbytes[k] <= 8'h00;
    end else begin
      if (ms_tick && enc_count != 8'd0 && state != S_DONE) timer <= timer + 1'b1;
      case (state)
        S_RECV: begin
          if (s_tvalid) begin
            for (int l = 0; l < 8; l++)
              if (s_tkeep[l] && (8 * int'(beat) + l < REC_BYTES))
                rbytes[5'(8 * int'(beat) + l)] <= s_tdata[8*l +: 8];
            if (s_tlast) begin
              beat  <= '0;
              word  <= '0;
              state <= S_PUSH;
            end else begin
              beat <= beat + 1'b1;
            end
          end else if (beat == 3'd0 && enc_count != 8'd0 && timer >= WAIT_MS) begin
            state <= S_DONE;
          end
        end
        S_PUSH: if (f_ready) begin
          enc_sum <= enc_sum + word_sum;
          if (word == 3'd5) begin
            enc_count <= enc_count + 1'b1;
            state <= (enc_count + 1'b1 == 8'(N_FLOWS)) ? S_DONE : S_RECV;
          end else begin
            word <= word + 1'b1;
          end
        end
        S_DONE: if (enc_ack) begin
          enc_count <= '0;
          enc_sum   <= '0;
          timer     <= '0;
          state     <= S_RECV;
        end
        default: state <= S_RECV;
      endcase
    end
  end
endmodule
