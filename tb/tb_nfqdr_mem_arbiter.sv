// tb_nfqdr_mem_arbiter: two random requesters (A and B) share a memory model
// through the arbiter. Checks: A is granted in every cycle it asks (one
// operation per cycle), B only when A does not ask and never with more than
// B_MAX_PENDING reads outstanding, and every read returns, to the requester
// that issued it and in order, the data of the last write to that address
// (a shadow memory updated at each granted write gives the expected value).
module tb_nfqdr_mem_arbiter;
  import qdr_pkg::*;
  localparam int MAW = 5, BMAX = 2;
  logic clk = 0, rst_n = 0;
  logic a_req, a_gnt, a_rvalid, b_req, b_gnt, b_rvalid, mem_req, mem_rvalid;
  logic [2:0] a_we, b_we, mem_we;
  logic [MAW-1:0] a_addr, b_addr, mem_addr;
  logic [3*QW-1:0] a_wdata, b_wdata, rdata, mem_wdata, mem_rdata;
  int checks = 0, failures = 0, a_reads = 0, b_reads = 0, b_blocked = 0, b_pend = 0;
  logic [3*QW-1:0] shadow [2**MAW];
  logic [3*QW-1:0] qa[$], qb[$];
  always #5 clk = ~clk;

  nfqdr_mem_arbiter #(.MAW(MAW), .B_MAX_PENDING(BMAX)) dut (
    .clk, .rst_n, .a_req, .a_we, .a_addr, .a_wdata, .a_gnt, .a_rvalid,
    .b_req, .b_we, .b_addr, .b_wdata, .b_gnt, .b_rvalid, .rdata,
    .mem_req, .mem_we, .mem_addr, .mem_wdata, .mem_rvalid, .mem_rdata);
  qdr_model #(.AW(MAW), .RL(3)) u_mem (
    .clk, .req(mem_req), .we(mem_we), .addr(mem_addr), .wdata(mem_wdata), .rvalid(mem_rvalid), .rdata(mem_rdata));

  initial begin
    #1_000_000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  function automatic logic [3*QW-1:0] rnd();
    logic [3*QW-1:0] v;
    for (int k = 0; k < 3*QW; k += 16) v[k +: 16] = 16'($urandom);
    return v;
  endfunction

  // judge each cycle at the falling edge
  always @(negedge clk) if (rst_n) begin
    checks++;
    if (a_req && !a_gnt) begin failures++; $display("A refused"); end
    if (a_req && b_gnt) begin failures++; $display("B granted while A asks"); end
    if (b_req && !a_req && !b_gnt) b_blocked++;
    if (a_rvalid) begin
      checks++;
      if (qa.size() == 0 || rdata !== qa[0]) begin failures++; $display("A read data wrong"); end
      if (qa.size() != 0) void'(qa.pop_front());
    end
    if (b_rvalid) begin
      checks++;
      if (qb.size() == 0 || rdata !== qb[0]) begin failures++; $display("B read data wrong"); end
      if (qb.size() != 0) void'(qb.pop_front());
      b_pend--;
    end
    if (a_gnt && a_we == '0) begin qa.push_back(shadow[a_addr]); a_reads++; end
    if (b_gnt && b_we == '0) begin qb.push_back(shadow[b_addr]); b_reads++; b_pend++; end
    if (b_pend > BMAX) begin failures++; $display("B has %0d reads pending", b_pend); end
    for (int s = 0; s < 3; s++) begin
      if (a_gnt && a_we[s]) shadow[a_addr][QW*s +: QW] = a_wdata[QW*s +: QW];
      else if (b_gnt && b_we[s]) shadow[b_addr][QW*s +: QW] = b_wdata[QW*s +: QW];
    end
  end

  initial begin
    a_req = 0; b_req = 0; a_we = '0; b_we = '0; a_addr = '0; b_addr = '0; a_wdata = '0; b_wdata = '0;
    // fill memory and shadow with known data through A
    repeat (2) @(posedge clk); #1 rst_n = 1;
    for (int i = 0; i < 2**MAW; i++) begin
      a_req = 1; a_we = '1; a_addr = MAW'(i); a_wdata = rnd();
      @(posedge clk); #1;
    end
    for (int c = 0; c < 4000; c++) begin
      a_req = ($urandom_range(0, 2) == 0);
      a_we = ($urandom_range(0, 1) == 0) ? 3'($urandom) : '0;
      a_addr = MAW'($urandom); a_wdata = rnd();
      // B keeps its request until granted
      if (!b_req || b_gnt_seen) begin
        b_req = ($urandom_range(0, 1) == 0);
        b_we = ($urandom_range(0, 3) == 0) ? 3'($urandom) : '0;
        b_addr = MAW'($urandom); b_wdata = rnd();
      end
      @(negedge clk); b_gnt_seen = b_gnt;
      @(posedge clk); #1;
    end
    a_req = 0; b_req = 0;
    repeat (10) @(posedge clk);
    #1;
    checks++;
    if (qa.size() != 0 || qb.size() != 0 || a_reads < 100 || b_reads < 100 || b_blocked == 0) begin
      failures++; $display("left %0d/%0d, reads %0d/%0d, B held back %0d", qa.size(), qb.size(), a_reads, b_reads, b_blocked);
    end
    $display("A reads %0d, B reads %0d, B held back by the pending limit %0d cycles", a_reads, b_reads, b_blocked);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  bit b_gnt_seen = 0;
endmodule
