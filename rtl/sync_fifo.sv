// sync_fifo: single-clock first-in first-out buffer.
//
// DEPTH words of WIDTH bits (DEPTH a power of two), valid/ready on both
// sides. The array is read asynchronously at the head so that out_data is
// valid together with out_valid; count gives the fill level. Used for the
// flow-record FIFO of the flow cache and the PDU FIFO of the NetFlow export.
module sync_fifo #(
  parameter int unsigned WIDTH = 240,
  parameter int unsigned DEPTH = 64,
  parameter int unsigned AW    = $clog2(DEPTH)
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             in_valid,
  output logic             in_ready,
  input  logic [WIDTH-1:0] in_data,
  output logic             out_valid,
  input  logic             out_ready,
  output logic [WIDTH-1:0] out_data,
  output logic [AW:0]      count
);
  logic [WIDTH-1:0] mem [DEPTH];
  logic [AW:0] wp, rp;

  assign count     = wp - rp;
  assign in_ready  = count != (AW+1)'(DEPTH);
  assign out_valid = count != '0;
  assign out_data  = mem[rp[AW-1:0]];

  always_ff @(posedge clk) begin
    if (in_valid && in_ready) mem[wp[AW-1:0]] <= in_data;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wp <= '0;
      rp <= '0;
    end else begin
      if (in_valid && in_ready)   wp <= wp + 1'b1;
      if (out_valid && out_ready) rp <= rp + 1'b1;
    end
  end
endmodule
