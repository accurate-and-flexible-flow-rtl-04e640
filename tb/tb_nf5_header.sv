// tb_nf5_header: random batches through the NetFlow v5 header stage; the
// header bytes, the flow sequence (sum of earlier counts), the extended
// checksum sum and the one-cycle done are compared with a model.
module tb_nf5_header;
  import tb_util_pkg::*;
  logic clk = 0, rst_n = 0, start, done;
  logic [7:0] count; logic [31:0] pdu_sum, up, secs, nsecs, sum;
  logic [191:0] hdr;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;
  nf5_header dut (.clk, .rst_n, .start, .count, .pdu_sum, .uptime_ms(up), .unix_secs(secs),
                  .unix_nsecs(nsecs), .done, .hdr, .sum);
  initial begin
    #1_000_000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    logic [31:0] seq, es;
    bytes_t b;
    logic [191:0] eh;
    start = 0; count = 0; pdu_sum = 0; up = 0; secs = 0; nsecs = 0;
    repeat (2) @(posedge clk); #1 rst_n = 1;
    seq = 0;
    for (int i = 0; i < 200; i++) begin
      count = 8'($urandom_range(1, 30)); pdu_sum = $urandom_range(0, 32'h00FF_FFFF);
      up = $urandom; secs = $urandom; nsecs = $urandom; start = 1;
      b.delete();
      put16(b, 16'd5); put16(b, 16'(count)); put32(b, up); put32(b, secs); put32(b, nsecs);
      put32(b, seq); put16(b, 16'd0); put16(b, 16'd0);
      es = pdu_sum;
      for (int k = 0; k < 24; k++) eh[191 - 8*k -: 8] = b[k];
      for (int k = 0; k < 24; k += 2) es += {16'd0, b[k], b[k+1]};
      @(posedge clk); #1 start = 0;
      checks++;
      if (!done || hdr !== eh || sum !== es) begin failures++; $display("batch %0d", i); end
      seq += 32'(count);
      @(posedge clk); #1;
      checks++; if (done) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
