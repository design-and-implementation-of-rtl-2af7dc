// mf_pkg: constants and types shared by the median filter modules.
//
// The compare-and-swap cells of both filters hold a two-bit state {S, E}.
// Three codes are legal: equal (S=0,E=1), the state at the start of a word,
// pass (S=0,E=0), in which the cell has seen A>B and leaves its inputs where
// they are, and swap (S=1,E=0), in which it has seen A<B and exchanges them.
// The codes, the window size of 9 and the real-time word length of 8 are the
// ones the filter chips were built with.
package mf_pkg;

  // Window size of one filter chip (number of sorted lines and of stages).
  localparam int unsigned WIN = 9;

  // Word length of the real-time filter.
  localparam int unsigned RT_WORD = 8;

  // Latency of the real-time filter in clock edges, counted from the edge that
  // samples a new window column to the edge after which the median of the
  // window it completes is on the output: RT_WORD-1 edges of bit skew and
  // WIN sorting stages.
  localparam int unsigned RT_LATENCY = (RT_WORD - 1) + WIN;

  typedef enum logic [1:0] {
    CS_PASS  = 2'b00,
    CS_EQUAL = 2'b01,
    CS_SWAP  = 2'b10
  } cs_state_e;

  // Next state of a cell that sees the bit pair (a, b) in state st. The first
  // unequal bit pair, read from the most significant end, decides the order.
  function automatic cs_state_e cs_next(cs_state_e st, logic a, logic b);
    if (st != CS_EQUAL) return st;
    if (a & ~b)         return CS_PASS;
    if (~a & b)         return CS_SWAP;
    return CS_EQUAL;
  endfunction

endpackage
