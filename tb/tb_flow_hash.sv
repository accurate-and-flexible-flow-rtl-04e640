// tb_flow_hash: random and corner 5-tuples through the hashing stage, with
// random back-pressure; each hash is compared with a long-division model,
// order and payload are checked, and full throughput (one per cycle) is
// checked when the output is always ready.
module tb_flow_hash;
  import flow_pkg::*;
  import tb_util_pkg::*;
  logic clk = 0, rst_n = 0;
  logic in_valid, in_ready, out_valid, out_ready;
  pkt_info_t in_info, out_info;
  logic [13:0] out_hash;
  int checks = 0, failures = 0;
  pkt_info_t q[$];
  always #5 clk = ~clk;

  flow_hash dut (.clk, .rst_n, .in_valid, .in_ready, .in_info, .out_valid, .out_ready,
                 .out_info, .out_hash);

  initial begin
    #2_000_000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  // checker: a transfer happens at the rising edge after a falling edge
  // that sees valid and ready
  always @(negedge clk) if (rst_n && out_valid && out_ready) begin
    pkt_info_t e;
    e = q.pop_front();
    checks++;
    if (out_info !== e || out_hash !== hash_ref(e.tuple)) begin
      failures++; $display("%0t mismatch hash %h exp %h info %0d q %0d", $time, out_hash, hash_ref(e.tuple), out_info === e, q.size());
    end
  end

  // Inputs change 1 ns after a rising edge and are sampled at the falling
  // edge: a transfer happens at the rising edge after a falling edge that
  // sees valid and ready.
  task automatic send(pkt_info_t p);
    in_valid = 1; in_info = p;
    @(negedge clk);
    while (!in_ready) @(negedge clk);
    @(posedge clk); #1;
    q.push_back(p);
    in_valid = 0;
  endtask

  initial begin
    pkt_info_t p;
    int n, t0;
    in_valid = 0; in_info = '0; out_ready = 0;
    repeat (2) @(posedge clk); #1 rst_n = 1;
    // known values: zero tuple hashes to zero, single bit gives x^(14+i) mod P
    checks++; if (hash_ref(104'd0) != 0) failures++;
    checks++; if (hash_ref(104'd1) != 14'h002B) failures++;
    // random with back-pressure
    fork
      for (int i = 0; i < 400; i++) begin
        pkt_info_t p;
        p = '0; p.tuple = rand_tuple($urandom_range(0,1)); p.ts = $urandom; p.bytes = 16'($urandom);
        if (i == 0) p.tuple = '1;
        send(p);
      end
      repeat (1200) begin @(posedge clk); #1 out_ready = ($urandom_range(0,3) != 0); end
    join
    @(posedge clk); #1 out_ready = 1;
    repeat (5) @(posedge clk);
    #1;
    // throughput: 100 back-to-back items take about 100 cycles
    n = checks; t0 = $time;
    for (int i = 0; i < 100; i++) begin
      p = '0; p.tuple = rand_tuple(1); send(p);
    end
    t0 = ($time - t0) / 10;
    repeat (3) @(posedge clk);
    n = checks - n;
    checks++;
    if (n != 100 || t0 > 102) begin
      failures++; $display("throughput: %0d items in %0d cycles", n, t0);
    end
    checks++; if (q.size() != 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
