// tb_udp_header: random payloads; the stage gets the payload's plain 16-bit
// word sum and its header is checked by recomputing the UDP checksum over
// the pseudo-header, header and payload (must give zero when included).
module tb_udp_header;
  import tb_util_pkg::*;
  logic clk = 0, rst_n = 0, start, done;
  logic [15:0] plen, ulen; logic [31:0] psum; logic [63:0] hdr;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;
  udp_header dut (.clk, .rst_n, .start, .payload_len(plen), .payload_sum(psum), .done, .hdr,
                  .udp_len(ulen));
  initial begin
    #1_000_000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    bytes_t pl, all;
    start = 0; plen = 0; psum = 0;
    repeat (2) @(posedge clk); #1 rst_n = 1;
    for (int i = 0; i < 200; i++) begin
      int n;
      n = 24 + 48 * $urandom_range(1, 30);
      pl.delete();
      for (int k = 0; k < n; k++) pl.push_back(8'($urandom));
      psum = 0;
      for (int k = 0; k < n; k += 2) psum += {16'd0, pl[k], pl[k+1]};
      plen = 16'(n); start = 1;
      @(posedge clk); #1 start = 0;
      all.delete();
      put32(all, 32'hC0A8_0001); put32(all, 32'hC0A8_0002); put16(all, 16'd17); put16(all, 16'(n + 8));
      for (int k = 7; k >= 0; k--) all.push_back(hdr[8*k +: 8]);
      foreach (pl[k]) all.push_back(pl[k]);
      checks++;
      if (!done || ulen != 16'(n + 8) || hdr[63:32] != {16'd2055, 16'd2055} || hdr[31:16] != 16'(n + 8)
          || inet_csum(all, 0, all.size()) != 16'h0000 || hdr[15:0] == 16'h0000) begin
        failures++; $display("payload %0d: hdr %h", n, hdr);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
