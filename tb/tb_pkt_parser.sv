// tb_pkt_parser: drives TCP, UDP (some with IP options) and non-flow frames
// into the parser as 64-bit AXI4-Stream beats, with minimum-size frames
// back to back at the 12-cycle worst-case spacing, and checks every parsed
// 5-tuple, TCP flags, IP length and start-of-frame timestamp against the
// values the frames were built from; checks that ARP, ICMP, IPv4-less and
// FCS-errored frames are discarded, and that a result not taken in time is
// dropped and counted.
module tb_pkt_parser;
  import flow_pkg::*;
  import tb_util_pkg::*;
  logic clk = 0, rst_n = 0;
  logic [31:0] now;
  logic [63:0] tdata; logic [7:0] tkeep; logic tvalid, tready, tlast, tuser;
  logic out_valid, out_ready;
  pkt_info_t out_info;
  logic [31:0] accepted, rejected, dropped;
  int checks = 0, failures = 0;
  pkt_info_t q[$];
  always #5 clk = ~clk;

  pkt_parser dut (.clk, .rst_n, .now, .s_tdata(tdata), .s_tkeep(tkeep), .s_tvalid(tvalid),
                  .s_tready(tready), .s_tlast(tlast), .s_tuser(tuser), .out_valid, .out_ready,
                  .out_info, .accepted, .rejected, .dropped);

  initial begin
    #5_000_000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  always @(negedge clk) if (rst_n && out_valid && out_ready) begin
    pkt_info_t e;
    checks++;
    if (q.size() == 0) begin failures++; $display("unexpected output"); end
    else begin
      e = q.pop_front();
      if (out_info !== e) begin
        failures++; $display("%0t got %h exp %h", $time, out_info, e);
      end
    end
  end

  // Sends a frame starting at posedge+1; returns after the last beat, then
  // idles for gap cycles. now is the cycle counter (timestamp source).
  task automatic send_frame(bytes_t f, bit bad_fcs, int gap, output logic [31:0] sof);
    int nb;
    nb = (f.size() + 7) / 8;
    sof = now;
    for (int b = 0; b < nb; b++) begin
      tvalid = 1; tlast = (b == nb - 1); tuser = bad_fcs && tlast;
      for (int l = 0; l < 8; l++) begin
        tkeep[l] = (8*b + l < f.size());
        tdata[8*l +: 8] = tkeep[l] ? f[8*b + l] : 8'h00;
      end
      @(posedge clk); #1;
    end
    tvalid = 0; tlast = 0; tuser = 0;
    repeat (gap) begin @(posedge clk); #1; end
  endtask

  always @(posedge clk) now <= rst_n ? now + 1 : 0;

  initial begin
    five_tuple_t t;
    pkt_info_t e;
    bytes_t f;
    logic [7:0] fl;
    logic [31:0] sof;
    int len, n_good, n_bad, t0;
    tvalid = 0; tlast = 0; tuser = 0; tdata = '0; tkeep = '0; out_ready = 1;
    repeat (2) @(posedge clk); #1 rst_n = 1;
    n_good = 0; n_bad = 0;
    // random mix, minimum gap of 4 idle cycles
    for (int i = 0; i < 300; i++) begin
      int kind;
      kind = $urandom_range(0, 9);
      t = rand_tuple(kind < 5);
      fl = (kind < 5) ? 8'($urandom) : 8'h00;
      len = $urandom_range(40, 300);
      case (kind)
        7: begin f = build_frame(t, fl, len, 16'h0806); n_bad++; send_frame(f, 0, 4, sof); end
        8: begin t.proto = 8'd1; f = build_frame(t, fl, len); n_bad++; send_frame(f, 0, 4, sof); end
        9: begin f = build_frame(t, fl, len); n_bad++; send_frame(f, 1, 4, sof); end
        default: begin
          f = build_frame(t, fl, len, 16'h0800, (kind == 6) ? 7 : 5, (kind == 5) ? len + 14 : 60);
          e = '{tuple: t, tcp_flags: fl, ts: now, bytes: 16'(len)};
          q.push_back(e);
          n_good++;
          send_frame(f, 0, 4, sof);
        end
      endcase
    end
    // worst case: 200 minimum frames, one every 12 cycles
    t0 = now;
    for (int i = 0; i < 200; i++) begin
      t = rand_tuple(1); fl = 8'h10;
      f = build_frame(t, fl, 46);
      e = '{tuple: t, tcp_flags: fl, ts: now, bytes: 16'd46};
      q.push_back(e); n_good++;
      send_frame(f, 0, 4, sof);
    end
    checks++;
    if (now - t0 != 200 * 12) begin failures++; $display("spacing %0d", now - t0); end
    repeat (5) @(posedge clk); #1;
    checks++;
    if (accepted != n_good || rejected != n_bad || dropped != 0 || q.size() != 0) begin
      failures++; $display("acc %0d/%0d rej %0d/%0d drop %0d q %0d", accepted, n_good, rejected, n_bad, dropped, q.size());
    end
    // back-pressure: output held, the second result is dropped
    out_ready = 0;
    t = rand_tuple(0); f = build_frame(t, 0, 46);
    e = '{tuple: t, tcp_flags: 0, ts: now, bytes: 16'd46}; q.push_back(e);
    send_frame(f, 0, 4, sof);
    t = rand_tuple(0); f = build_frame(t, 0, 46);
    send_frame(f, 0, 4, sof);
    checks++; if (dropped != 1) begin failures++; $display("dropped %0d", dropped); end
    out_ready = 1;
    repeat (3) @(posedge clk); #1;
    checks++; if (q.size() != 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
