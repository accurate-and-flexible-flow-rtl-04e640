// csum_pkg: one's-complement checksum helpers of the NetFlow v5 export
// engine (RFC 768 / RFC 791 style). Partial sums are carried as 32-bit
// plain sums of 16-bit words and folded only at the end.
package csum_pkg;
  function automatic logic [15:0] fold16(logic [31:0] s);
    logic [31:0] t;
    t = {16'd0, s[15:0]} + {16'd0, s[31:16]};
    t = {16'd0, t[15:0]} + {16'd0, t[31:16]};
    return t[15:0];
  endfunction
endpackage
