// frame_sender: Ethernet frame sender of the NetFlow v5 export engine.
//
// On send_start it streams frame memory words 0..last out of a 64-bit
// AXI4-Stream master, tlast and tkeep = last_keep on the final word, all
// bytes valid on the others. The memory is read one word ahead: the read
// address is the next word whenever a beat is accepted, so one beat can
// leave per cycle while tready is high and the data hold while it is low.
// pkt_sent pulses for one cycle after the last beat is accepted, freeing the
// frame memory for the next frame.
module frame_sender #(
  parameter int unsigned AW = 8
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          send_start,
  input  logic [AW-1:0] last,
  input  logic [7:0]    last_keep,
  output logic [AW-1:0] raddr,
  input  logic [63:0]   rdata,
  output logic [63:0]   m_tdata,
  output logic [7:0]    m_tkeep,
  output logic          m_tvalid,
  input  logic          m_tready,
  output logic          m_tlast,
  output logic          pkt_sent,
  output logic [31:0]   n_frames
);
  logic          sending;
  logic [AW-1:0] ptr, last_q;
  logic [7:0]    keep_q;
  logic          fire;

  assign m_tvalid = sending;
  assign m_tdata  = rdata;
  assign m_tlast  = sending && (ptr == last_q);
  assign m_tkeep  = m_tlast ? keep_q : 8'hFF;
  assign fire     = m_tvalid && m_tready;
  assign raddr    = (fire && !m_tlast) ? ptr + 1'b1 : (sending ? ptr : '0);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sending <= 1'b0; ptr <= '0; last_q <= '0; keep_q <= '0;
      pkt_sent <= 1'b0; n_frames <= '0;
    end else begin
      pkt_sent <= 1'b0;
      if (!sending) begin
        if (send_start) begin
          sending <= 1'b1;
          ptr     <= '0;
          last_q  <= last;
          keep_q  <= last_keep;
        end
      end else if (fire) begin
        if (m_tlast) begin
          sending  <= 1'b0;
          pkt_sent <= 1'b1;
          n_frames <= n_frames + 1'b1;
        end else begin
          ptr <= ptr + 1'b1;
        end
      end
    end
  end

`ifndef SYNTHESIS
  a_axis_hold: assert property (@(posedge clk) disable iff (!rst_n)
    m_tvalid && !m_tready |=> m_tvalid && $stable(m_tdata) && $stable(m_tlast));
`endif
endmodule
