// mf9rt: real-time 3x3 median filter chip, WORD-bit samples, one median per
// clock.
//
// Each clock one new column of the sliding 3x3 window enters on x_i, y_i and
// z_i (one sample per image row). Two column registers keep the previous two
// columns, so the nine window words are the new column and the two before
// it. The words are sorted by WORD rt_bitslice blocks in parallel, one per
// bit position, the most significant first. Block k (bit WORD-1-k) receives
// its bits k clocks late through a chain of delay registers, so that it
// meets the compare states the block above derived for the same words; the
// median bit of block k is then delayed WORD-1-k clocks so that all bits of
// a median leave together. The most significant block takes its compare
// state from the test inputs st_i/et_i: st_i=0, et_i=1 (the equal state) in
// normal operation; other values let each block be exercised on its own.
//
// The sorter structure, the bit skew at input and output, the three-sample
// input and the test inputs follow the chip. The full network is kept in
// every block; cells that cannot reach the median are left for synthesis to
// remove. The window line order (x, x-1, x-2, y, .., z-2) is this design's
// choice and does not change the median.
//
// Timing: the median of the window completed by the column sampled at clock
// edge t is on median_o after edge t + RT_LATENCY (16 for WORD = 8). ce gates
// median_o (0 when low) and leaves the pipeline running. rst_n (this
// design's own addition) clears all registers.
module mf9rt #(
  parameter int unsigned WORD = mf_pkg::RT_WORD
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            ce,
  input  logic            st_i,      // test input: swap flag of the MSB block
  input  logic            et_i,      // test input: equal flag of the MSB block
  input  logic [WORD-1:0] x_i,       // new sample, window row 1
  input  logic [WORD-1:0] y_i,       // new sample, window row 2
  input  logic [WORD-1:0] z_i,       // new sample, window row 3
  output logic [WORD-1:0] median_o
);

  localparam int unsigned WIN = mf_pkg::WIN;
  localparam int unsigned NP  = (WIN - 1) / 2;
  localparam int unsigned NC  = WIN * NP;
  localparam int unsigned MID = (WIN - 1) / 2;

  typedef logic [WORD-1:0] word_t;

  // column registers: col_q[0] newest
  word_t col_q [3][3];   // [age][row]
  word_t win_w [WIN];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      col_q <= '{default: '0};
    end else begin
      col_q[0] <= '{x_i, y_i, z_i};
      col_q[1] <= col_q[0];
      col_q[2] <= col_q[1];
    end
  end

  always_comb begin
    for (int r = 0; r < 3; r++)
      for (int a = 0; a < 3; a++)
        win_w[3*r+a] = col_q[a][r];
  end

  logic [NC-1:0]  s_blk [WORD+1];
  logic [NC-1:0]  e_blk [WORD+1];
  logic [WORD-1:0] med_bits;

  assign s_blk[0] = {NC{st_i}};
  assign e_blk[0] = {NC{et_i}};

  for (genvar k = 0; k < WORD; k++) begin : g_blk
    localparam int unsigned B = WORD - 1 - k;   // bit position of block k

    logic [WIN-1:0] bits_w;
    logic [WIN-1:0] skew_q [k+1];               // skew_q[0] is undelayed
    logic [WIN-1:0] sorted_w;
    logic           deskew_q [WORD-k];          // deskew_q[0] is undelayed

    always_comb begin
      for (int i = 0; i < WIN; i++) bits_w[i] = win_w[i][B];
    end

    assign skew_q[0] = bits_w;
    for (genvar d = 1; d <= k; d++) begin : g_skew
      always_ff @(posedge clk or negedge rst_n) begin
        if (!rst_n) skew_q[d] <= '0;
        else        skew_q[d] <= skew_q[d-1];
      end
    end

    rt_bitslice #(.WIN(WIN)) u_slice (
      .clk, .rst_n,
      .d_i(skew_q[k]),
      .s_i(s_blk[k]),   .e_i(e_blk[k]),
      .s_o(s_blk[k+1]), .e_o(e_blk[k+1]),
      .s_bits_o(sorted_w)
    );

    assign deskew_q[0] = sorted_w[MID];
    for (genvar d = 1; d < WORD - k; d++) begin : g_deskew
      always_ff @(posedge clk or negedge rst_n) begin
        if (!rst_n) deskew_q[d] <= 1'b0;
        else        deskew_q[d] <= deskew_q[d-1];
      end
    end

    assign med_bits[B] = deskew_q[WORD-1-k];
  end

  assign median_o = ce ? med_bits : '0;

endmodule
