// tb_grid_checker: drives one mf9ee_array of the given size with windows of
// NWIN random samples and checks it; used by tb_adaptive_window.
//
// Each window gets its own word length (1 to 10 bits) and is streamed
// bit-serially, MSB first, with the word-end mark on the last bit; windows
// follow back to back. The median output and every sorted sample line are
// compared, COLS*9-1 clocks after the input bits, with a software sort. When
// all windows are checked, done goes high with the counts on checks and
// failures.
module tb_grid_checker #(
  parameter int ROWS = 1,
  parameter int COLS = 1,
  parameter int NWIN = 9,
  parameter int NGROUPS = 60
) (
  input  logic clk,
  input  logic rst_n,
  output logic done,
  output int   checks,
  output int   failures
);
  localparam int WIN = 9;
  localparam int NL = ROWS * (WIN + 1) - 1;
  localparam int PAD_TOP = (NL - NWIN) / 2;
  localparam int LAT = COLS * WIN;
  localparam int MAXC = NGROUPS * 10 + LAT + 4;

  logic r_i, r_o, median_o;
  logic [NWIN-1:0] win_i;
  logic [NL-1:0] sorted_o;

  mf9ee_array #(.WIN(WIN), .ROWS(ROWS), .COLS(COLS), .NWIN(NWIN)) dut (
    .clk, .rst_n, .ce(1'b1), .r_i, .r_o, .win_i, .sorted_o, .median_o);

  typedef logic [9:0] w_t;
  logic          med_hist  [MAXC];
  logic [NL-1:0] sort_hist [MAXC];

  initial begin
    int cyc, len;
    int starts[$], lens[$];
    w_t words[$];
    w_t grp[NWIN], ref_s[NWIN];
    w_t gmed, gl;
    logic ok;
    done = 1'b0; checks = 0; failures = 0;
    r_i = 1'b0; win_i = '0;
    @(posedge rst_n);
    @(negedge clk);
    cyc = 0;
    for (int g = 0; g < NGROUPS; g++) begin
      len = 1 + ($urandom % 10);
      for (int k = 0; k < NWIN; k++) begin
        grp[k] = w_t'($urandom) & w_t'((1 << len) - 1);
        if (g % 6 == 4) grp[k] = (k == NWIN - 1) ? w_t'((1 << len) - 1) : '0;
        if (g % 6 == 5) grp[k] = (k == 0) ? '0 : w_t'((1 << len) - 1);
        words.push_back(grp[k]);
      end
      starts.push_back(cyc); lens.push_back(len);
      for (int i = len - 1; i >= 0; i--) begin
        for (int k = 0; k < NWIN; k++) win_i[k] = grp[k][i];
        r_i = (i == 0);
        @(negedge clk);
        if (cyc >= LAT - 1) begin
          med_hist[cyc-(LAT-1)] = median_o; sort_hist[cyc-(LAT-1)] = sorted_o;
        end
        cyc++;
      end
    end
    win_i = '0; r_i = 1'b0;
    for (int n = 0; n < LAT; n++) begin
      @(negedge clk);
      med_hist[cyc-(LAT-1)] = median_o; sort_hist[cyc-(LAT-1)] = sorted_o;
      cyc++;
    end
    for (int g = 0; g < NGROUPS; g++) begin
      len = lens[g];
      for (int k = 0; k < NWIN; k++) ref_s[k] = words[g*NWIN+k];
      ref_s.rsort();
      gmed = '0;
      for (int i = 0; i < len; i++) gmed[len-1-i] = med_hist[starts[g]+i];
      ok = (gmed == ref_s[(NWIN-1)/2]);
      for (int l = 0; l < NWIN; l++) begin
        gl = '0;
        for (int i = 0; i < len; i++) gl[len-1-i] = sort_hist[starts[g]+i][PAD_TOP+l];
        ok &= (gl == ref_s[l]);
      end
      checks++;
      if (!ok) begin
        failures++;
        $display("FAIL grid %0dx%0d w=%0d window %0d median %h exp %h",
                 ROWS, COLS, NWIN, g, gmed, ref_s[(NWIN-1)/2]);
      end
    end
    done = 1'b1;
  end
endmodule
