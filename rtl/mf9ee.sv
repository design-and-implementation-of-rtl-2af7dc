// mf9ee: extensible bit-serial median filter chip (window 9, any word length).
//
// WIN words enter in parallel, one bit of each per clock, most significant bit
// first, on d_i; r_i is high during the last bit of every word. They pass
// through WIN stages of an odd/even transposition sorting network built of
// csu1 cells. Every stage has (WIN+1)/2 cells and pairs every line:
//   stages 1,3,5,..,WIN : lines (1,2),(3,4),..,(WIN-2,WIN-1) and (WIN, y)
//   stages 2,4,..,WIN-1 : lines (x,1),(2,3),..,(WIN-1,WIN)
// where line 1 is the top and "larger" moves up. x and y are the upper and
// lower extension inputs. With x held at 1 and y at 0 the extension cells
// only delay their data line, and s_o leaves the chip sorted, largest on
// s_o[0]; median_o is the middle line s_o[(WIN-1)/2].
//
// Extension (for windows above 9, see mf9ee_array): the lower extension cell
// of stage j sends its lower output on y_o, which the chip below takes as x_i
// of stage j+1; that chip returns the upper output of its upper extension
// cell on x_o, which comes back here as y_i of stage j+2. The pair of chips
// thereby shares one extra line between them, so stacked chips form one
// larger odd/even transposition network. y_i[0] (stage 1) and y_o[last]
// (stage WIN) are the two ends of that shared line and link horizontally to
// the chips before and after. Ports, by stage:
//   x_i[k], x_o[k] : stage 2k+2 (k = 0..(WIN-3)/2)
//   y_i[k], y_o[k] : stage 2k+1 (k = 0..(WIN-1)/2)
// The sorting network, the cell counts, the 1/0 extension ties and the reset
// pipeline follow the chip; numbering the extension ports by stage and the
// shared-line scheme are this design's reading of the chip's pin list.
//
// Timing: each stage is one register, so a bit on d_i at clock t is on s_o
// after clock t+WIN-1 (first sorted bit WIN clocks after the first input bit,
// a whole L-bit median WIN+L clocks after the first input bit; one median per
// L clocks when words follow back to back). The word-end mark r_i moves one
// stage per clock with its data and leaves on r_o, aligned with s_o, for the
// next chip of a chain. ce is the chip enable: it gates s_o and median_o
// (0 when low) and leaves the pipeline running. rst_n (this design's own)
// clears every register and puts every cell in the equal state.
module mf9ee #(
  parameter int unsigned WIN = mf_pkg::WIN   // lines and stages, odd, >= 3
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 ce,
  input  logic                 r_i,
  output logic                 r_o,
  input  logic [WIN-1:0]       d_i,       // [0] is the top line
  output logic [WIN-1:0]       s_o,       // sorted, [0] largest
  output logic                 median_o,
  input  logic [(WIN-1)/2-1:0] x_i,
  output logic [(WIN-1)/2-1:0] x_o,
  input  logic [(WIN+1)/2-1:0] y_i,
  output logic [(WIN+1)/2-1:0] y_o
);

  localparam int unsigned NX = (WIN - 1) / 2;
  localparam int unsigned NY = (WIN + 1) / 2;

  // line[j][k]: bit on line k entering stage j (j = 0 .. WIN).
  logic [WIN-1:0] line [WIN+1];
  // rst_pipe[j]: word-end mark entering stage j.
  logic [WIN:0]   rst_pipe;

  assign line[0]     = d_i;
  assign rst_pipe[0] = r_i;

  for (genvar j = 0; j < WIN; j++) begin : g_stage
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) rst_pipe[j+1] <= 1'b0;
      else        rst_pipe[j+1] <= rst_pipe[j];
    end

    if (j % 2 == 0) begin : g_odd
      // pairs (0,1),(2,3),.. and (WIN-1, y)
      for (genvar p = 0; p < NX; p++) begin : g_cell
        csu1 u_csu (
          .clk, .rst_n, .r_i(rst_pipe[j]),
          .a_i(line[j][2*p]),     .b_i(line[j][2*p+1]),
          .a_o(line[j+1][2*p]),   .b_o(line[j+1][2*p+1])
        );
      end
      csu1 u_ext (
        .clk, .rst_n, .r_i(rst_pipe[j]),
        .a_i(line[j][WIN-1]),   .b_i(y_i[j/2]),
        .a_o(line[j+1][WIN-1]), .b_o(y_o[j/2])
      );
    end else begin : g_even
      // pairs (x, 0) and (1,2),(3,4),..
      csu1 u_ext (
        .clk, .rst_n, .r_i(rst_pipe[j]),
        .a_i(x_i[j/2]),  .b_i(line[j][0]),
        .a_o(x_o[j/2]),  .b_o(line[j+1][0])
      );
      for (genvar p = 0; p < NX; p++) begin : g_cell
        csu1 u_csu (
          .clk, .rst_n, .r_i(rst_pipe[j]),
          .a_i(line[j][2*p+1]),   .b_i(line[j][2*p+2]),
          .a_o(line[j+1][2*p+1]), .b_o(line[j+1][2*p+2])
        );
      end
    end
  end

  assign r_o      = rst_pipe[WIN];
  assign s_o      = ce ? line[WIN] : '0;
  assign median_o = ce & line[WIN][NX];

  initial begin
    assert (WIN % 2 == 1 && WIN >= 3) else $error("mf9ee: WIN must be odd and >= 3");
    assert (NY == NX + 1);
  end

endmodule
