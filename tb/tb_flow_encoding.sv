// tb_flow_encoding: records in, PDU words out. Every 64-bit word written to
// the PDU FIFO is compared with a reference NetFlow v5 record; the batch is
// checked to close at N = 4 PDUs at once and, for a partial batch, only
// after WAIT_MS ms of CYCLES_PER_MS cycles; the PDU count and the partial
// checksum (folded) are compared with a byte-wise sum; input is held off
// until the acknowledge; a stalled FIFO stalls the encoder.
module tb_flow_encoding;
  import flow_pkg::*;
  import tb_util_pkg::*;
  localparam int N = 4, WAIT = 3, CPM = 10;
  logic clk = 0, rst_n = 0, ms_tick;
  logic [63:0] s_tdata, f_data; logic [7:0] s_tkeep;
  logic s_tvalid, s_tready, s_tlast, f_valid, f_ready, enc_ready, enc_ack;
  logic [7:0] enc_count; logic [31:0] enc_sum;
  int checks = 0, failures = 0;
  bytes_t exp_b, batch_b;
  int n_batch = 0;
  longint cyc = 0, first_t;
  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;
  always @(posedge clk) ms_tick <= rst_n && (cyc % CPM == CPM - 1);

  flow_encoding #(.N_FLOWS(N), .WAIT_MS(WAIT)) dut (.clk, .rst_n, .ms_tick, .s_tdata, .s_tkeep,
    .s_tvalid, .s_tready, .s_tlast, .f_valid, .f_ready, .f_data, .enc_ready, .enc_count,
    .enc_sum, .enc_ack);

  initial begin
    #5_000_000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  always @(negedge clk) if (rst_n && f_valid && f_ready) begin
    for (int l = 0; l < 8; l++) begin
      logic [7:0] e;
      e = exp_b.pop_front();
      batch_b.push_back(f_data[8*l +: 8]);
      if (f_data[8*l +: 8] !== e) begin failures++; $display("PDU byte mismatch"); end
    end
    checks++;
  end

  task automatic send_rec(flow_rec_t r);
    bytes_t b, d;
    b = rec_bytes(r); d = nf5_pdu(r);
    foreach (d[k]) exp_b.push_back(d[k]);
    if (n_batch == 0) first_t = cyc;
    n_batch++;
    for (int beat = 0; beat < 4; beat++) begin
      s_tvalid = 1; s_tlast = (beat == 3);
      for (int l = 0; l < 8; l++) begin
        s_tkeep[l] = (8*beat + l < 30);
        s_tdata[8*l +: 8] = s_tkeep[l] ? b[8*beat + l] : 8'h00;
      end
      @(negedge clk);
      while (!s_tready) @(negedge clk);
      @(posedge clk); #1;
    end
    s_tvalid = 0; s_tlast = 0;
  endtask

  // waits for enc_ready, checks the batch and acknowledges it
  task automatic close_batch(int n, bit timed);
    logic [31:0] s;
    while (!enc_ready) begin @(posedge clk); #1; end
    checks++;
    s = 0;
    for (int k = 0; k < batch_b.size(); k += 2) s += {16'd0, batch_b[k], batch_b[k+1]};
    if (enc_count != 8'(n) || batch_b.size() != 48 * n || csum_pkg::fold16(enc_sum) != csum_pkg::fold16(s)) begin
      failures++; $display("batch count %0d/%0d bytes %0d", enc_count, n, batch_b.size());
    end
    checks++;
    if (timed && cyc - first_t < longint'(WAIT * CPM)) begin failures++; $display("closed early"); end
    // input held off while waiting for the acknowledge
    s_tvalid = 1;
    repeat (3) begin @(negedge clk); checks++; if (s_tready) begin failures++; $display("ready before ack"); end end
    @(posedge clk); #1;
    s_tvalid = 0;
    enc_ack = 1; @(posedge clk); #1 enc_ack = 0;
    batch_b.delete(); n_batch = 0;
  endtask

  function automatic flow_rec_t rnd_rec();
    logic [255:0] v;
    for (int i = 0; i < 8; i++) v[32*i +: 32] = $urandom;
    return flow_rec_t'(v[REC_W-1:0]);
  endfunction

  initial begin
    s_tvalid = 0; s_tlast = 0; s_tdata = '0; s_tkeep = '0; f_ready = 1; enc_ack = 0;
    repeat (2) @(posedge clk); #1 rst_n = 1;
    fork
      begin
        for (int b = 0; b < 5; b++) begin
          repeat (N) send_rec(rnd_rec());
          close_batch(N, 0);
        end
        repeat (2) send_rec(rnd_rec());
        close_batch(2, 1);
        send_rec(rnd_rec());
        close_batch(1, 1);
      end
      forever begin @(posedge clk); #1 f_ready = $urandom_range(0, 2) != 0; end
    join_any
    checks++; if (exp_b.size() != 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
