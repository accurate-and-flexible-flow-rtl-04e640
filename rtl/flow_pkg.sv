// flow_pkg: types and constants shared by the flow cache and the NetFlow v5
// export engine.
//
// The 5-tuple is 104 bits, ordered source IP, destination IP, source port,
// destination port, protocol (most significant first). A flow-table entry is
// 241 bits: busy flag, 5-tuple, OR of the TCP flags seen, first and last
// timestamps, packet counter and byte counter, in that order from the MSB.
// An exported record is the same entry without the busy flag (240 bits); on
// the AXI4-Stream link it is sent as 30 bytes, first byte in tdata[7:0].
// Timestamps count milliseconds since reset.
package flow_pkg;

  localparam int unsigned TUPLE_W = 104;
  localparam int unsigned TS_W    = 32;
  localparam int unsigned CNT_W   = 32;

  localparam logic [7:0] PROTO_TCP = 8'h06;
  localparam logic [7:0] PROTO_UDP = 8'h11;
  localparam int unsigned TCP_FIN_BIT = 0;
  localparam int unsigned TCP_RST_BIT = 2;

  typedef struct packed {
    logic [31:0] src_ip;
    logic [31:0] dst_ip;
    logic [15:0] src_port;
    logic [15:0] dst_port;
    logic [7:0]  proto;
  } five_tuple_t;

  // What the parser delivers for each accepted frame.
  typedef struct packed {
    five_tuple_t tuple;
    logic [7:0]  tcp_flags;
    logic [TS_W-1:0] ts;
    logic [15:0] bytes;      // IPv4 Total Length
  } pkt_info_t;

  // One exported flow record.
  typedef struct packed {
    five_tuple_t tuple;
    logic [7:0]  tcp_flags;
    logic [TS_W-1:0]  first_ts;
    logic [TS_W-1:0]  last_ts;
    logic [CNT_W-1:0] pkts;
    logic [CNT_W-1:0] bytes;
  } flow_rec_t;

  // One flow-table word.
  typedef struct packed {
    logic      busy;
    flow_rec_t rec;
  } flow_entry_t;

  localparam int unsigned REC_W   = $bits(flow_rec_t);    // 240
  localparam int unsigned ENTRY_W = $bits(flow_entry_t);  // 241
  localparam int unsigned REC_BYTES = REC_W / 8;          // 30

  // Low-order terms (x^HASH_W implied) of a primitive polynomial of degree
  // w, from the usual tables of maximal-length LFSR taps. The flow table
  // depth sets w; 14 (16,384 entries) is the default.
  function automatic logic [31:0] prim_poly(int unsigned w);
    case (w)
      4:  return 32'h3;       // x^4+x+1
      5:  return 32'h5;       // x^5+x^2+1
      6:  return 32'h3;       // x^6+x+1
      7:  return 32'h3;       // x^7+x+1
      8:  return 32'h71;      // x^8+x^6+x^5+x^4+1
      9:  return 32'h11;      // x^9+x^4+1
      10: return 32'h9;       // x^10+x^3+1
      11: return 32'h5;       // x^11+x^2+1
      12: return 32'h53;      // x^12+x^6+x^4+x+1
      13: return 32'h1B;      // x^13+x^4+x^3+x+1
      14: return 32'h2B;      // x^14+x^5+x^3+x+1
      15: return 32'h3;       // x^15+x+1
      16: return 32'h2D;      // x^16+x^5+x^3+x^2+1
      17: return 32'h9;       // x^17+x^3+1
      18: return 32'h81;      // x^18+x^7+1
      19: return 32'h27;      // x^19+x^5+x^2+x+1
      20: return 32'h9;       // x^20+x^3+1
      default: return 32'h3;
    endcase
  endfunction

  // Byte k of a record on the wire (k = 0 is the most significant byte).
  function automatic logic [7:0] rec_byte(flow_rec_t r, int unsigned k);
    logic [REC_W-1:0] v;
    v = r;
    return v[REC_W-1-8*k -: 8];
  endfunction

endpackage
