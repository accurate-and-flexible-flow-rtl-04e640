// tb_flow_table: checks the post-reset clear sweep, independent reads and
// writes on both ports against a model array, and the one-cycle read
// latency, on a 64-entry table.
module tb_flow_table;
  import flow_pkg::*;
  localparam int DEPTH = 64;
  logic clk = 0, rst_n = 0, init_done;
  logic a_en, a_we, b_en, b_we;
  logic [5:0] a_addr, b_addr;
  flow_entry_t a_wdata, a_rdata, b_wdata, b_rdata;
  flow_entry_t model [DEPTH];
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  flow_table #(.DEPTH(DEPTH)) dut (.clk, .rst_n, .init_done, .a_en, .a_we, .a_addr, .a_wdata,
                                   .a_rdata, .b_en, .b_we, .b_addr, .b_wdata, .b_rdata);
  initial begin
    #1_000_000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  function automatic flow_entry_t rnd_entry();
    logic [255:0] v;
    for (int i = 0; i < 8; i++) v[32*i +: 32] = $urandom;
    return flow_entry_t'(v[ENTRY_W-1:0]);
  endfunction

  initial begin
    int cyc;
    logic [5:0] pa, pb; logic pae, pbe; flow_entry_t ea, eb;
    a_en = 0; a_we = 0; b_en = 0; b_we = 0; a_addr = 0; b_addr = 0; a_wdata = '0; b_wdata = '0;
    for (int i = 0; i < DEPTH; i++) model[i] = '0;
    repeat (2) @(posedge clk); #1 rst_n = 1;
    cyc = 0;
    while (!init_done) begin @(posedge clk); #1; cyc++; end
    checks++; if (cyc != DEPTH) begin failures++; $display("init took %0d", cyc); end
    pae = 0; pbe = 0;
    for (int i = 0; i < 2000; i++) begin
      a_en = $urandom_range(0, 3) != 0; a_we = a_en && ($urandom_range(0, 2) == 0);
      b_en = $urandom_range(0, 3) != 0; b_we = b_en && ($urandom_range(0, 2) == 0);
      a_addr = 6'($urandom); b_addr = 6'($urandom);
      if (a_we && b_we && a_addr == b_addr) b_we = 0;
      a_wdata = rnd_entry(); b_wdata = rnd_entry();
      @(negedge clk);
      // read data of the previous cycle's reads
      if (pae) begin checks++; if (a_rdata !== ea) begin failures++; $display("A rd %0d", pa); end end
      if (pbe) begin checks++; if (b_rdata !== eb) begin failures++; $display("B rd %0d", pb); end end
      @(posedge clk); #1;
      // a read returns the word as it was before this cycle's writes
      pae = a_en && !a_we; pa = a_addr; pbe = b_en && !b_we; pb = b_addr;
      ea = model[a_addr]; eb = model[b_addr];
      if (a_en && a_we) model[a_addr] = a_wdata;
      if (b_en && b_we) model[b_addr] = b_wdata;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
