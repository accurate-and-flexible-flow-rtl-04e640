// tb_sys_time_gen: checks uptime in ms, seconds and nanoseconds of the
// export engine's time source against a cycle count.
module tb_sys_time_gen;
  localparam int unsigned CPM = 3;
  logic clk = 0, rst_n = 0;
  logic [31:0] up, secs, nsecs;
  logic ms_tick;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  sys_time_gen #(.CYCLES_PER_MS(CPM)) dut (.clk, .rst_n, .uptime_ms(up), .unix_secs(secs),
                                          .unix_nsecs(nsecs), .ms_tick);
  initial begin
    #1_000_000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    int cyc, ms;
    repeat (2) @(posedge clk);
    #1 rst_n = 1; cyc = 0;
    repeat (CPM * 2500) begin
      @(posedge clk); #1; cyc++;
      ms = cyc / CPM;
      if (cyc % 97 == 0 || ms % 1000 == 0) begin
        checks++;
        if (up != 32'(ms) || secs != 32'(ms / 1000) || nsecs != 32'((ms % 1000) * 1_000_000)) begin
          failures++; $display("cyc %0d up %0d secs %0d nsecs %0d", cyc, up, secs, nsecs);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
