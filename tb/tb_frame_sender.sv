// tb_frame_sender: random frames of 60..1506 bytes are written into a frame
// memory and sent; the stream (tkeep, tlast) is reassembled and compared
// under random back-pressure, pkt_sent must pulse once per frame, and with
// tready held high a frame of W words must take W cycles.
module tb_frame_sender;
  import tb_util_pkg::*;
  logic clk = 0, rst_n = 0;
  logic we; logic [7:0] be; logic [7:0] waddr, raddr, last; logic [63:0] wdata, rdata;
  logic send_start; logic [7:0] last_keep;
  logic [63:0] m_tdata; logic [7:0] m_tkeep; logic m_tvalid, m_tready, m_tlast, pkt_sent;
  logic [31:0] n_frames;
  int checks = 0, failures = 0, n_sent = 0, beats = 0;
  bytes_t cur;
  always #5 clk = ~clk;

  frame_mem u_mem (.clk, .we, .be, .waddr, .wdata, .raddr, .rdata);
  frame_sender dut (.clk, .rst_n, .send_start, .last, .last_keep, .raddr, .rdata, .m_tdata,
                    .m_tkeep, .m_tvalid, .m_tready, .m_tlast, .pkt_sent, .n_frames);
  initial begin
    #5_000_000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  always @(negedge clk) if (rst_n) begin
    if (pkt_sent) n_sent++;
    if (m_tvalid && m_tready) begin
      beats++;
      for (int l = 0; l < 8; l++) if (m_tkeep[l]) cur.push_back(m_tdata[8*l +: 8]);
    end
  end

  initial begin
    bytes_t f;
    int len, w, t0;
    bit full_rate;
    we = 0; be = 0; waddr = 0; wdata = 0; send_start = 0; last = 0; last_keep = 0; m_tready = 1;
    repeat (2) @(posedge clk); #1 rst_n = 1;
    for (int i = 0; i < 40; i++) begin
      full_rate = (i % 4 == 0);
      len = (i == 1) ? 1506 : $urandom_range(60, 1506);
      w = (len + 7) / 8;
      f.delete();
      for (int k = 0; k < len; k++) f.push_back(8'($urandom));
      for (int k = 0; k < w; k++) begin
        we = 1; be = 8'hFF; waddr = 8'(k);
        for (int l = 0; l < 8; l++) wdata[8*l +: 8] = (8*k + l < len) ? f[8*k + l] : 8'hEE;
        @(posedge clk); #1;
      end
      we = 0;
      last = 8'(w - 1); last_keep = 8'((16'd1 << (len - 8 * (w - 1))) - 1);
      send_start = 1; cur.delete(); beats = 0;
      @(posedge clk); #1 send_start = 0;
      t0 = $time;
      fork
        begin : stall
          if (!full_rate) forever begin m_tready = $urandom_range(0, 1); @(posedge clk); #1; end
        end
        begin
          while (n_sent == i) begin @(posedge clk); #1; end
          disable stall;
        end
      join
      m_tready = 1;
      checks++;
      if (cur != f || beats != w) begin failures++; $display("frame %0d len %0d got %0d", i, len, cur.size()); end
      if (full_rate) begin
        checks++;
        if (($time - t0) / 10 > w + 2) begin failures++; $display("rate: %0d words in %0d cycles", w, ($time - t0) / 10); end
      end
    end
    checks++; if (n_frames != 40) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
