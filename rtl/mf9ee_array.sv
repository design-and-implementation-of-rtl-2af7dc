// mf9ee_array: ROWS x COLS grid of extensible chips, a bit-serial median
// filter for windows of up to 8*COLS+1 samples.
//
// Chips of one row are chained: the sorted lines and the word-end mark of a
// chip feed the next chip to the right, so a row has COLS*WIN sorting stages.
// Chips of one column are stacked through their extension ports: the top
// row's upper extension inputs are held at 1, the bottom row's lower ones at
// 0, and each pair of neighbouring chips shares one extra line (see mf9ee).
// The grid is then one odd/even transposition network of
// NL = ROWS*(WIN+1)-1 lines: the WIN lines of row 0, the line shared by rows
// 0 and 1, the WIN lines of row 1, and so on.
//
// Where two chips of a row meet, the same stage type occurs twice, so the
// grid has only COLS*(WIN-1)+1 alternating stages, fewer than NL. The NWIN
// samples are therefore placed on the middle lines of the grid: the
// PAD_TOP = (NL-NWIN)/2 lines above them are driven with all ones and the
// lines below with all zeros. Those constant words never move, and the
// samples see an odd/even transposition network of NWIN lines with at least
// NWIN alternating stages, which sorts them completely. The median is line
// PAD_TOP + (NWIN-1)/2. The default, 3 x 3 chips for a window of 25, is the
// arrangement given for w = 25 (29 lines, 25 alternating stages); driving
// unused lines with ones or zeros follows the description of the grid, the
// centred placement is this design's choice.
//
// Interface: win_i[i] is the current bit of sample i, MSB first, one bit per
// clock; r_i marks the last bit of each word. sorted_o holds all NL lines,
// [0] the largest (the top padding), the samples on
// sorted_o[PAD_TOP +: NWIN] in descending order.
// Timing: every bit crosses COLS*WIN registers, so the first bit of the
// result leaves COLS*WIN-1 clocks after the first bit went in; r_o is
// aligned with the outputs. ce gates the outputs of the last column.
module mf9ee_array #(
  parameter int unsigned WIN  = mf_pkg::WIN,
  parameter int unsigned ROWS = 3,
  parameter int unsigned COLS = 3,
  parameter int unsigned NWIN = 25,
  localparam int unsigned NL      = ROWS * (WIN + 1) - 1,
  localparam int unsigned PAD_TOP = (NL - NWIN) / 2
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 ce,
  input  logic                 r_i,
  output logic                 r_o,
  input  logic [NWIN-1:0]      win_i,
  output logic [NL-1:0]        sorted_o,
  output logic                 median_o
);

  localparam int unsigned NX = (WIN - 1) / 2;
  localparam int unsigned NY = (WIN + 1) / 2;

  // all grid lines at the first column: padding, then samples, then padding
  logic [NL-1:0]  gin;
  always_comb begin
    for (int g = 0; g < NL; g++) begin
      if (int'(g) < int'(PAD_TOP))  gin[g] = 1'b1;
      else if (g < PAD_TOP + NWIN)  gin[g] = win_i[g-PAD_TOP];
      else                          gin[g] = 1'b0;
    end
  end

  logic [WIN-1:0] d   [ROWS][COLS];
  logic [WIN-1:0] s   [ROWS][COLS];
  logic           ri  [ROWS][COLS];
  logic           ro  [ROWS][COLS];
  logic [NX-1:0]  xi  [ROWS][COLS];
  logic [NX-1:0]  xo  [ROWS][COLS];
  logic [NY-1:0]  yi  [ROWS][COLS];
  logic [NY-1:0]  yo  [ROWS][COLS];

  for (genvar r = 0; r < ROWS; r++) begin : g_row
    for (genvar c = 0; c < COLS; c++) begin : g_col
      // data and word-end mark along the row
      if (c == 0) begin : g_first
        assign d[r][c]  = gin[r*(WIN+1) +: WIN];
        assign ri[r][c] = r_i;
      end else begin : g_next
        assign d[r][c]  = s[r][c-1];
        assign ri[r][c] = ro[r][c-1];
      end

      // upper extension
      if (r == 0) begin : g_top
        assign xi[r][c] = '1;
      end else begin : g_below
        assign xi[r][c] = yo[r-1][c][NX-1:0];
      end

      // lower extension
      if (r == ROWS - 1) begin : g_bottom
        assign yi[r][c] = '0;
      end else begin : g_above
        if (c == 0) begin : g_e0
          assign yi[r][c][0] = gin[r*(WIN+1) + WIN];
        end else begin : g_en
          assign yi[r][c][0] = yo[r][c-1][NY-1];
        end
        assign yi[r][c][NY-1:1] = xo[r+1][c];
      end

      mf9ee #(.WIN(WIN)) u_chip (
        .clk, .rst_n, .ce(1'b1),
        .r_i(ri[r][c]), .r_o(ro[r][c]),
        .d_i(d[r][c]), .s_o(s[r][c]), .median_o(),
        .x_i(xi[r][c]), .x_o(xo[r][c]),
        .y_i(yi[r][c]), .y_o(yo[r][c])
      );
    end

    // global order of the sorted lines after the last column
    assign sorted_o[r*(WIN+1) +: WIN] = ce ? s[r][COLS-1] : '0;
    if (r < ROWS - 1) begin : g_shared
      assign sorted_o[r*(WIN+1) + WIN] = ce & yo[r][COLS-1][NY-1];
    end
  end

  assign r_o      = ro[0][COLS-1];
  assign median_o = sorted_o[PAD_TOP + (NWIN-1)/2];

  initial begin
    assert (NWIN >= 1 && NWIN <= COLS * (WIN - 1) + 1 && NWIN <= NL)
      else $error("mf9ee_array: NWIN exceeds the stages or lines of the grid");
  end

endmodule
