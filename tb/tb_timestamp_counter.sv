// tb_timestamp_counter: checks that the millisecond counter advances once
// every CYCLES_PER_TICK clocks, with a tick pulse, from zero after reset.
module tb_timestamp_counter;
  localparam int unsigned CPT = 7;
  logic clk = 0, rst_n = 0;
  logic [31:0] now;
  logic tick;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  timestamp_counter #(.CYCLES_PER_TICK(CPT), .TS_W(32)) dut (.clk, .rst_n, .now, .tick);

  initial begin
    #200000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    int cyc, ticks;
    repeat (3) @(posedge clk);
    checks++; if (now !== 0) begin failures++; $display("not zero after reset"); end
    #1 rst_n = 1;
    cyc = 0; ticks = 0;
    repeat (CPT * 20) begin
      @(posedge clk); #1; cyc++;
      if (tick) ticks++;
      checks++;
      if (now != 32'(cyc / CPT)) begin failures++; $display("cyc %0d now %0d", cyc, now); end
    end
    checks++; if (ticks != 20) begin failures++; $display("ticks %0d", ticks); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
