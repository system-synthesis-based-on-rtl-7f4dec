// fifo_pkg: the design decisions of the constrained FIFO, shared by its blocks.
//
// The FIFO is described as a Moore machine over "timed" signals: on every
// event cycle a signal either carries a value (present) or nothing (absent).
// The two sizing decisions below come from the exploration of the FIFO inside
// an ATM switch: the buffer holds eight items and at most four items enter
// per event cycle. The item width is not fixed by that exploration; eight
// bits is this design's own choice.
package fifo_pkg;

  // Buffer length in items (bounded list capacity).
  localparam int BUFFER_SIZE = 8;
  // Largest number of items accepted in one event cycle (parallel inputs).
  localparam int MAX_INPUTS  = 4;
  // Width of one item.
  localparam int DATA_W      = 8;

  // Width of a field counting 0..n items.
  function automatic int count_w(input int n);
    return $clog2(n + 1);
  endfunction

endpackage
