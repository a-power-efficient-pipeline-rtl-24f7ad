// fifo_pkg: sizes shared by the synchronous clock-gated FIFO.
//
// The FIFO is 128 words deep and 128 bits wide, the configuration the
// design is built around. Pointers carry one bit more than the word
// address: the extra "lap" bit tells a full buffer from an empty one when
// both pointers address the same word. The occupancy counter needs
// clog2(DEPTH+1) bits to hold every value from 0 to DEPTH.
package fifo_pkg;
  parameter int unsigned FIFO_DEPTH = 128;  // words in the circular buffer
  parameter int unsigned FIFO_WIDTH = 128;  // bits per word

  // Address width for a buffer of the given depth (at least one bit).
  function automatic int unsigned addr_bits(int unsigned depth);
    return (depth > 1) ? $clog2(depth) : 1;
  endfunction

  // Width of a counter holding 0..depth.
  function automatic int unsigned count_bits(int unsigned depth);
    return $clog2(depth + 1);
  endfunction
endpackage
