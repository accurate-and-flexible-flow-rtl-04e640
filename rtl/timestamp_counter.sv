// timestamp_counter: free-running time base of the flow cache.
//
// Counts milliseconds since reset. A prescaler divides the core clock by
// CYCLES_PER_TICK (200,000 for one millisecond at the 200 MHz MAC user clock)
// and the TS_W-bit counter advances by one on each prescaler wrap. The count
// timestamps arriving frames and is the "current time" against which the
// timeout monitor ages flows. Output is registered; it wraps modulo 2^TS_W.
// The millisecond unit follows the document; a GPS time source could replace
// this block without changing its interface.
module timestamp_counter #(
  parameter int unsigned CYCLES_PER_TICK = 200_000,
  parameter int unsigned TS_W            = 32
) (
  input  logic            clk,
  input  logic            rst_n,
  output logic [TS_W-1:0] now,
  output logic            tick      // one-cycle pulse when now advances
);
  localparam int unsigned PW = (CYCLES_PER_TICK > 1) ? $clog2(CYCLES_PER_TICK) : 1;
  logic [PW-1:0] pre;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pre  <= '0;
      now  <= '0;
      tick <= 1'b0;
    end else if (pre == PW'(CYCLES_PER_TICK - 1)) begin
      pre  <= '0;
      now  <= now + 1'b1;
      tick <= 1'b1;
    end else begin
      pre  <= pre + 1'b1;
      tick <= 1'b0;
    end
  end
endmodule
