// fifo_pkg: types and helpers shared by the FIFO modules.
//
// fifo_mode_e selects how the controller treats a write request that
// arrives while the FIFO is full:
//   FIFO_MODE_STRICT     - the write is refused (the basic FIFO).
//   FIFO_MODE_WR_ON_READ - the write is accepted if a read is carried out in
//                          the same cycle, because that read frees a location
//                          at the same clock edge (the updated FIFO).
// addr_bits() and count_bits() give the widths of a pointer that indexes
// DEPTH locations and of a counter that holds 0..DEPTH items. Both are at
// least 1 so that a 1-deep FIFO still elaborates.
package fifo_pkg;

  typedef enum logic {
    FIFO_MODE_STRICT     = 1'b0,
    FIFO_MODE_WR_ON_READ = 1'b1
  } fifo_mode_e;

  function automatic int unsigned addr_bits(input int unsigned depth);
    return (depth > 1) ? $clog2(depth) : 1;
  endfunction

  function automatic int unsigned count_bits(input int unsigned depth);
    return $clog2(depth + 1);
  endfunction

endpackage
