// tb_general_control: the general control process with a frame memory and a
// modelled PDU FIFO and header chain. For batches of 1..30 PDUs it checks
// the acknowledge and header start, then reads the whole frame memory back
// and compares it with the expected frame (Ethernet header, the three
// headers, PDU bytes shifted to byte 66), the last-word index and tkeep
// given to the sender, and that the next batch waits for pkt_sent.
module tb_general_control;
  import tb_util_pkg::*;
  logic clk = 0, rst_n = 0;
  logic enc_ready, enc_ack, f_valid, f_ready, hdr_start, ip_done;
  logic [7:0] enc_count;
  logic [63:0] f_data;
  logic [191:0] nf5_hdr; logic [63:0] udp_hdr; logic [159:0] ip_hdr;
  logic m_we; logic [7:0] m_be, m_addr, send_last, send_keep, raddr; logic [63:0] m_wdata, rdata;
  logic send_start, pkt_sent;
  int checks = 0, failures = 0, acks = 0, starts = 0;
  logic [63:0] fifo[$];
  always #5 clk = ~clk;

  general_control dut (.clk, .rst_n, .enc_ready, .enc_count, .enc_ack, .f_valid, .f_ready, .f_data,
    .hdr_start, .ip_done, .nf5_hdr, .udp_hdr, .ip_hdr, .m_we, .m_be, .m_addr, .m_wdata,
    .send_start, .send_last, .send_keep, .pkt_sent);
  frame_mem u_mem (.clk, .we(m_we), .be(m_be), .waddr(m_addr), .wdata(m_wdata), .raddr, .rdata);

  initial begin
    #5_000_000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  // FIFO model: head shown when non-empty, popped on transfer
  initial begin f_valid = 0; f_data = '0; end
  always @(posedge clk) begin
    if (rst_n && f_valid && f_ready) void'(fifo.pop_front());
    #1;
    f_valid = fifo.size() > 0;
    f_data  = f_valid ? fifo[0] : 64'd0;
  end
  always @(negedge clk) if (rst_n) begin
    if (enc_ack) acks++;
    if (hdr_start) starts++;
  end

  initial begin
    bytes_t f;
    int n, len;
    enc_ready = 0; enc_count = 0; ip_done = 0; pkt_sent = 0; raddr = 0;
    nf5_hdr = '0; udp_hdr = '0; ip_hdr = '0;
    repeat (2) @(posedge clk); #1 rst_n = 1;
    for (int b = 0; b < 30; b++) begin
      n = (b == 0) ? 30 : (b == 1) ? 1 : $urandom_range(1, 30);
      f.delete();
      put16(f, 16'h0002); put32(f, 32'h0000_0002);   // destination MAC
      put16(f, 16'h0002); put32(f, 32'h0000_0001);   // source MAC
      put16(f, 16'h0800);
      for (int k = 0; k < 5; k++) ip_hdr[32*k +: 32] = $urandom;
      for (int k = 0; k < 2; k++) udp_hdr[32*k +: 32] = $urandom;
      for (int k = 0; k < 6; k++) nf5_hdr[32*k +: 32] = $urandom;
      for (int k = 19; k >= 0; k--) f.push_back(ip_hdr[8*k +: 8]);
      for (int k = 7; k >= 0; k--) f.push_back(udp_hdr[8*k +: 8]);
      for (int k = 23; k >= 0; k--) f.push_back(nf5_hdr[8*k +: 8]);
      for (int w = 0; w < 6 * n; w++) begin
        logic [63:0] d;
        d = {$urandom, $urandom};
        for (int l = 0; l < 8; l++) f.push_back(d[8*l +: 8]);
        fifo.push_back(d);
      end
      len = f.size();
      enc_ready = 1; enc_count = 8'(n);
      @(negedge clk);
      while (!enc_ack) @(negedge clk);
      @(posedge clk); #1 enc_ready = 0;
      repeat (3) @(posedge clk); #1 ip_done = 1;
      @(posedge clk); #1 ip_done = 0;
      while (!send_start) begin @(posedge clk); #1; end
      checks++;
      if (send_last != 8'((len - 1) / 8) || send_keep != 8'h03 || fifo.size() != 0) begin
        failures++; $display("batch %0d: last %0d keep %h", b, send_last, send_keep);
      end
      for (int w = 0; w <= (len - 1) / 8; w++) begin
        raddr = 8'(w);
        @(posedge clk); #1;
        for (int l = 0; l < 8; l++) if (8*w + l < len) begin
          checks++;
          if (rdata[8*l +: 8] !== f[8*w + l]) begin failures++; $display("batch %0d byte %0d", b, 8*w + l); end
        end
      end
      // the next batch must wait for pkt_sent
      if (b < 29) begin
        enc_ready = 1; enc_count = 8'd1;
        repeat (5) begin @(negedge clk); checks++; if (enc_ack) begin failures++; $display("ack before sent"); end end
        @(posedge clk); #1 enc_ready = 0;
      end
      pkt_sent = 1; @(posedge clk); #1 pkt_sent = 0;
    end
    checks++; if (acks != 30 || starts != 30) begin failures++; $display("acks %0d starts %0d", acks, starts); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
