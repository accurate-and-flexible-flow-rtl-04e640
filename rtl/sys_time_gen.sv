// sys_time_gen: time source of the NetFlow v5 export engine.
//
// Keeps the three clocks a NetFlow v5 header carries: milliseconds since
// reset (SysUptime), and seconds plus residual nanoseconds (unix_secs,
// unix_nsecs). A prescaler of CYCLES_PER_MS clock cycles makes the
// millisecond tick, which is also given out as ms_tick. With no absolute
// time reference, seconds count from reset; a GPS or host-set epoch would
// be loaded here. Outputs are registered.
module sys_time_gen #(
  parameter int unsigned CYCLES_PER_MS = 200_000
) (
  input  logic        clk,
  input  logic        rst_n,
  output logic [31:0] uptime_ms,
  output logic [31:0] unix_secs,
  output logic [31:0] unix_nsecs,
  output logic        ms_tick
);
  localparam int unsigned PW = (CYCLES_PER_MS > 1) ? $clog2(CYCLES_PER_MS) : 1;
  logic [PW-1:0] pre;
  logic [9:0]    ms_in_s;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pre <= '0; ms_in_s <= '0; ms_tick <= 1'b0;
      uptime_ms <= '0; unix_secs <= '0; unix_nsecs <= '0;
    end else begin
      ms_tick <= 1'b0;
      if (pre == PW'(CYCLES_PER_MS - 1)) begin
        pre       <= '0;
        ms_tick   <= 1'b1;
        uptime_ms <= uptime_ms + 1'b1;
        if (ms_in_s == 10'd999) begin
          ms_in_s    <= '0;
          unix_secs  <= unix_secs + 1'b1;
          unix_nsecs <= '0;
        end else begin
          ms_in_s    <= ms_in_s + 1'b1;
          unix_nsecs <= unix_nsecs + 32'd1_000_000;
        end
      end else begin
        pre <= pre + 1'b1;
      end
    end
  end
endmodule
