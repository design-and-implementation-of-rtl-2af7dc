// csu2: compare-and-swap cell of the real-time median filter.
//
// The real-time filter sorts all bits of a word at once, one bit position per
// sorter block, most significant block first. A csu2 cell handles one bit of
// the two words it compares. It does not keep its own state across clocks:
// the state {S, E} reached by the cell at the same place in the block of the
// next more significant bit arrives on s_i/e_i, is updated with this bit pair
// and is sent on s_o/e_o to the block of the next less significant bit.
//   So = Si + Ei*~Ai*Bi          Eo = Ei*(Ai*Bi + ~Ai*~Bi)
//   Ao = ~So*Ai + So*Bi          Bo = So*Ai + ~So*Bi
// The most significant block receives the equal state (s_i=0, e_i=1).
//
// Timing: all four outputs are registered (one clock), so the block of the
// next bit processes the same words one clock later. rst_n (this design's own
// addition) clears the outputs to 0.
module csu2 (
  input  logic clk,
  input  logic rst_n,
  input  logic s_i,   // swap flag from the more significant bit
  input  logic e_i,   // equal flag from the more significant bit
  input  logic a_i,
  input  logic b_i,
  output logic s_o,   // swap flag for the less significant bit
  output logic e_o,   // equal flag for the less significant bit
  output logic a_o,   // larger word's bit
  output logic b_o    // smaller word's bit
);

  logic sx, ex;

  // The cell's own equations, so that the test inputs of the most significant
  // block may also drive the unused code S=1, E=1 (it behaves as swap).
  always_comb begin
    sx = s_i | (e_i & ~a_i & b_i);
    ex = e_i & ~(a_i ^ b_i);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      {s_o, e_o, a_o, b_o} <= '0;
    end else begin
      {s_o, e_o} <= {sx, ex};
      a_o        <= sx ? b_i : a_i;
      b_o        <= sx ? a_i : b_i;
    end
  end

endmodule
