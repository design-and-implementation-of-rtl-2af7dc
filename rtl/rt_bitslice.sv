// rt_bitslice: one sorter block of the real-time median filter, for one bit
// position of the nine window words.
//
// The block is an odd/even transposition network of WIN stages, made of csu2
// cells: stages 1,3,.. pair lines (1,2),(3,4),..,(WIN-2,WIN-1) and delay line
// WIN; stages 2,4,.. delay line 1 and pair (2,3),..,(WIN-1,WIN). The delay
// units keep every line one register per stage. Each cell takes the
// compare state of the same cell in the block of the next more significant
// bit (se_i) and passes its updated state on (se_o), so all blocks together
// order the full words although each block sees one bit of each.
//
// Cell numbering: cell c = stage*NP + pair, NP = (WIN-1)/2 cells per stage.
// Timing: d_i to s_o is WIN clocks; se_i of a cell is used in the clock after
// the block above used it, so this block's bits must arrive one clock after
// those of the block above.
module rt_bitslice #(
  parameter int unsigned WIN = mf_pkg::WIN,
  localparam int unsigned NP = (WIN - 1) / 2,
  localparam int unsigned NC = WIN * NP
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic [WIN-1:0] d_i,      // one bit of each window word
  input  logic [NC-1:0]  s_i,      // swap flags from the block above
  input  logic [NC-1:0]  e_i,      // equal flags from the block above
  output logic [NC-1:0]  s_o,      // swap flags to the block below
  output logic [NC-1:0]  e_o,      // equal flags to the block below
  output logic [WIN-1:0] s_bits_o  // sorted bits, [0] from the largest word
);

  logic [WIN-1:0] line [WIN+1];
  assign line[0] = d_i;

  for (genvar j = 0; j < WIN; j++) begin : g_stage
    localparam int unsigned OFS  = (j % 2 == 0) ? 0 : 1;   // first paired line
    localparam int unsigned IDLE = (j % 2 == 0) ? WIN - 1 : 0;

    for (genvar p = 0; p < NP; p++) begin : g_cell
      csu2 u_csu (
        .clk, .rst_n,
        .s_i(s_i[j*NP+p]), .e_i(e_i[j*NP+p]),
        .a_i(line[j][OFS+2*p]),   .b_i(line[j][OFS+2*p+1]),
        .s_o(s_o[j*NP+p]), .e_o(e_o[j*NP+p]),
        .a_o(line[j+1][OFS+2*p]), .b_o(line[j+1][OFS+2*p+1])
      );
    end

    // bitwise delay unit on the line this stage leaves unpaired
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) line[j+1][IDLE] <= 1'b0;
      else        line[j+1][IDLE] <= line[j][IDLE];
    end
  end

  assign s_bits_o = line[WIN];

endmodule
