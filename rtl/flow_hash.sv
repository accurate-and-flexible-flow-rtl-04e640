// flow_hash: hashing stage between the packet parser and Process A.
//
// The hash is the remainder of the 104-bit 5-tuple, multiplied by x^HASH_W,
// divided by a primitive polynomial of degree HASH_W over GF(2) (a CRC with
// zero initial value). The default polynomial x^14+x^5+x^3+x+1 gives the
// 14-bit address of a 16,384-entry flow table; smaller tables (used to
// shorten simulations) get a primitive polynomial of their own degree. The division is unrolled
// into XOR logic and registered: one cycle of latency, one packet per cycle,
// with a valid/ready handshake on both sides (a single register stage that
// can be refilled in the cycle it empties). The document calls for a
// polynomial-division hash with a primitive polynomial and a 14-bit code;
// the particular polynomial is this design's choice.
module flow_hash
  import flow_pkg::*;
#(
  parameter int unsigned   HASH_W = 14,
  parameter logic [31:0]   POLY   = prim_poly(HASH_W)   // 14: x^14+x^5+x^3+x+1
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              in_valid,
  output logic              in_ready,
  input  pkt_info_t         in_info,
  output logic              out_valid,
  input  logic              out_ready,
  output pkt_info_t         out_info,
  output logic [HASH_W-1:0] out_hash
);
  function automatic logic [HASH_W-1:0] crc(five_tuple_t t);
    logic [TUPLE_W-1:0] d;
    logic [HASH_W-1:0]  r;
    logic               fb;
    d = t;
    r = '0;
    for (int i = TUPLE_W - 1; i >= 0; i--) begin
      fb = r[HASH_W-1] ^ d[i];
      r  = {r[HASH_W-2:0], 1'b0};
      if (fb) r = r ^ POLY[HASH_W-1:0];
    end
    return r;
  endfunction

  assign in_ready = !out_valid || out_ready;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      out_info  <= '0;
      out_hash  <= '0;
    end else if (in_ready) begin
      out_valid <= in_valid;
      if (in_valid) begin
        out_info <= in_info;
        out_hash <= crc(in_info.tuple);
      end
    end
  end
endmodule
