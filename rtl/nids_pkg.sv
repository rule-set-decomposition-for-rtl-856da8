// nids_pkg: types shared by the payload pattern-matching engine.
//
// The engine scans a packet payload one byte per clock. A rule set is a list
// of content patterns; each pattern is stored right-justified in a packed
// vector of MAX_LEN bytes (its last character in byte 0) with its length given
// separately, so patterns may contain any byte value, 8'h00 included.
package nids_pkg;

  // One payload byte, as carried on the byte bus.
  typedef logic [7:0] byte_t;

  // Pattern index width for a rule set of n patterns (at least 1 bit).
  function automatic int unsigned idx_w(input int unsigned n);
    return (n > 1) ? $clog2(n) : 1;
  endfunction

endpackage
