// tb_ip_header: random UDP lengths; checks the IPv4 header fields, that the
// header checksum verifies (sum over the header is 0xFFFF) and that the
// identification increments per packet.
module tb_ip_header;
  import tb_util_pkg::*;
  logic clk = 0, rst_n = 0, start, done;
  logic [15:0] ulen; logic [159:0] hdr;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;
  ip_header dut (.clk, .rst_n, .start, .udp_len(ulen), .done, .hdr);
  initial begin
    #1_000_000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    bytes_t b;
    start = 0; ulen = 0;
    repeat (2) @(posedge clk); #1 rst_n = 1;
    for (int i = 0; i < 200; i++) begin
      ulen = 16'($urandom_range(80, 1472)); start = 1;
      @(posedge clk); #1 start = 0;
      b.delete();
      for (int k = 19; k >= 0; k--) b.push_back(hdr[8*k +: 8]);
      checks++;
      if (!done || be16(b, 0) != 16'h4500 || be16(b, 2) != ulen + 16'd20 || be16(b, 4) != 16'(i)
          || be16(b, 6) != 16'h4000 || b[8] != 8'd64 || b[9] != 8'd17
          || be32(b, 12) != 32'hC0A8_0001 || be32(b, 16) != 32'hC0A8_0002
          || inet_csum(b, 0, 20) != 16'h0000) begin
        failures++; $display("packet %0d hdr %h", i, hdr);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
