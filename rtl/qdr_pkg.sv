// qdr_pkg: memory organisation of the external-memory flow cache (NF_QDR).
//
// Each flow takes two 144-bit words of one QDR-II module (36-bit data, burst
// of four): the identity word at address {hash, 0} holds the 5-tuple, 39
// spare bits and the busy flag in bit 0; the information word at {hash, 1}
// holds 8 spare bits, the TCP flags, the first and last timestamps and the
// packet and byte counters. Field sizes follow the document's memory map;
// their order inside the word and which of the two addresses is even are
// this design's choice. Three modules (slots 0, 1, 2) are addressed in
// lockstep, so one read returns all three slots of a hash code.
package qdr_pkg;
  import flow_pkg::*;

  localparam int unsigned QW     = 144;
  localparam int unsigned NSLOTS = 3;

  typedef struct packed {
    five_tuple_t tuple;
    logic [38:0] spare;
    logic        busy;
  } qdr_id_t;

  typedef struct packed {
    logic [7:0]       spare;
    logic [7:0]       tcp_flags;
    logic [TS_W-1:0]  first_ts;
    logic [TS_W-1:0]  last_ts;
    logic [CNT_W-1:0] pkts;
    logic [CNT_W-1:0] bytes;
  } qdr_info_t;

  function automatic qdr_id_t id_word(five_tuple_t t, logic busy);
    return '{tuple: t, spare: '0, busy: busy};
  endfunction

  function automatic qdr_info_t info_word(flow_rec_t r);
    return '{spare: '0, tcp_flags: r.tcp_flags, first_ts: r.first_ts, last_ts: r.last_ts,
             pkts: r.pkts, bytes: r.bytes};
  endfunction

  function automatic flow_rec_t rec_of(qdr_id_t id, qdr_info_t inf);
    return '{tuple: id.tuple, tcp_flags: inf.tcp_flags, first_ts: inf.first_ts,
             last_ts: inf.last_ts, pkts: inf.pkts, bytes: inf.bytes};
  endfunction
endpackage
