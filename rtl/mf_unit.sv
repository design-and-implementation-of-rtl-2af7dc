// mf_unit: general purpose median filter unit.
//
// The unit holds the two filters side by side, each with its own chip enable,
// so that a host processor can use whichever suits the task:
//   * the extensible filter (mf9ee_array): bit-serial, any word length, a
//     window of 9 with one chip, larger windows with a grid of chips; one
//     median per L clocks for L-bit words;
//   * the real-time filter (mf9rt): 3x3 window of 8-bit samples, three new
//     samples per clock, one median per clock.
// The two filters share only the clock and reset. By default the extensible
// side is a single chip (a 1 x 1 grid, window 9), the unit's main
// configuration; EXT_ROWS/EXT_COLS/EXT_NWIN enlarge it.
//
// Interface and timing are those of the two filters, with ports prefixed
// ext_ and rt_: see mf9ee_array and mf9rt. A low chip enable forces that
// filter's outputs to 0.
module mf_unit #(
  parameter int unsigned EXT_ROWS = 1,
  parameter int unsigned EXT_COLS = 1,
  parameter int unsigned EXT_NWIN = mf_pkg::WIN,
  parameter int unsigned RT_WORD  = mf_pkg::RT_WORD,
  localparam int unsigned EXT_NL  = EXT_ROWS * (mf_pkg::WIN + 1) - 1
) (
  input  logic                          clk,
  input  logic                          rst_n,
  // extensible filter
  input  logic                          ext_ce,
  input  logic                          ext_r_i,
  output logic                          ext_r_o,
  input  logic [EXT_NWIN-1:0]           ext_win_i,
  output logic [EXT_NL-1:0]             ext_sorted_o,
  output logic                          ext_median_o,
  // real-time filter
  input  logic                          rt_ce,
  input  logic                          rt_st_i,
  input  logic                          rt_et_i,
  input  logic [RT_WORD-1:0]            rt_x_i,
  input  logic [RT_WORD-1:0]            rt_y_i,
  input  logic [RT_WORD-1:0]            rt_z_i,
  output logic [RT_WORD-1:0]            rt_median_o
);

  mf9ee_array #(
    .WIN (mf_pkg::WIN),
    .ROWS(EXT_ROWS),
    .COLS(EXT_COLS),
    .NWIN(EXT_NWIN)
  ) u_ext (
    .clk, .rst_n,
    .ce      (ext_ce),
    .r_i     (ext_r_i),
    .r_o     (ext_r_o),
    .win_i   (ext_win_i),
    .sorted_o(ext_sorted_o),
    .median_o(ext_median_o)
  );

  mf9rt #(.WORD(RT_WORD)) u_rt (
    .clk, .rst_n,
    .ce      (rt_ce),
    .st_i    (rt_st_i),
    .et_i    (rt_et_i),
    .x_i     (rt_x_i),
    .y_i     (rt_y_i),
    .z_i     (rt_z_i),
    .median_o(rt_median_o)
  );

endmodule
