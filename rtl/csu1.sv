// csu1: bit-serial compare-and-swap unit of the extensible median filter.
//
// Two words arrive one bit per clock, most significant bit first, on a_i and
// b_i. The cell starts each word in the equal state and passes the bits
// unchanged while they are equal. At the first bit pair that differs it locks:
// into pass if a_i=1, b_i=0 (A is the larger word), into swap if a_i=0, b_i=1,
// where it exchanges the two streams from that bit on. So a_o always carries
// the larger word and b_o the smaller.
//
// The decision for the current bit uses the state and the current bits
// (Sx = S + E*~A*B), so the bit that decides is already routed correctly.
// r_i marks the last bit of a word: the state returns to equal on the
// following clock, ready for the next word. The equations are those of the
// cell's logic diagram; the two-phase latches of the original are one rising
// clock edge here.
//
// Timing: a_o/b_o are registered, one clock after a_i/b_i. rst_n (this
// design's own addition, active low, asynchronous) clears the outputs and puts
// the cell in the equal state.
module csu1
  import mf_pkg::*;
(
  input  logic clk,
  input  logic rst_n,
  input  logic r_i,   // last bit of the current word
  input  logic a_i,   // upper input bit
  input  logic b_i,   // lower input bit
  output logic a_o,   // upper output bit (larger word)
  output logic b_o    // lower output bit (smaller word)
);

  cs_state_e st_q, st_x;
  logic      sx;

  always_comb begin
    st_x = cs_next(st_q, a_i, b_i);
    sx   = (st_x == CS_SWAP);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st_q <= CS_EQUAL;
      a_o  <= 1'b0;
      b_o  <= 1'b0;
    end else begin
      st_q <= r_i ? CS_EQUAL : st_x;
      a_o  <= sx ? b_i : a_i;
      b_o  <= sx ? a_i : b_i;
    end
  end

endmodule
