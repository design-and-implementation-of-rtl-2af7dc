// tb_mf9ee_array: self-checking testbench of the 3 x 3 grid of extensible
// chips for a 25-sample window (the grid's defaults).
//
// Windows of 25 random words (word length 1 to 10 bits, varying per window,
// with ties, all-equal and a single large sample at the bottom line included)
// enter bit-serially. Each window's result is read COLS*WIN-1 = 26 clocks
// after its bits went in and compared with a software sort: the median
// output, all 25 sorted sample lines, and the padding lines (two of ones on
// top, two of zeros below). The word-end mark must leave on r_o after the
// same 27 clocks.
module tb_mf9ee_array;
  localparam int WIN = 9, ROWS = 3, COLS = 3, NWIN = 25;
  localparam int NL = ROWS * (WIN + 1) - 1;
  localparam int PAD_TOP = (NL - NWIN) / 2;
  localparam int LAT = COLS * WIN;
  localparam int MAXC = 3000;

  logic clk = 1'b0;
  logic rst_n, ce, r_i, r_o, median_o;
  logic [NWIN-1:0] win_i;
  logic [NL-1:0] sorted_o;
  int checks = 0, failures = 0;

  mf9ee_array dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (MAXC + 100) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic med_hist [MAXC];
  logic [NL-1:0] sort_hist [MAXC];
  logic ro_hist  [MAXC];
  logic ri_hist  [MAXC];
  typedef logic [9:0] w_t;

  initial begin
    int cyc, len;
    int starts[$], lens[$];
    w_t words[$];
    w_t grp[NWIN], ref_s[NWIN];
    w_t gmed, gline [NL];
    logic ok;

    rst_n = 1'b0; ce = 1'b1; r_i = 1'b0; win_i = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    cyc = 0;
    for (int g = 0; g < 200; g++) begin
      len = (g < 10) ? g + 1 : 1 + ($urandom % 10);
      for (int k = 0; k < NWIN; k++) begin
        grp[k] = w_t'($urandom) & w_t'((1 << len) - 1);
        if (g % 7 == 3) grp[k] = grp[0];
        if (g % 7 == 5) grp[k] = w_t'((1 << len) - 1) - w_t'(k % len);
        if (g % 7 == 6) grp[k] = (k == NWIN - 1) ? w_t'((1 << len) - 1) : '0;
        words.push_back(grp[k]);
      end
      starts.push_back(cyc); lens.push_back(len);
      for (int i = len - 1; i >= 0; i--) begin
        for (int k = 0; k < NWIN; k++) win_i[k] = grp[k][i];
        r_i = (i == 0);
        @(negedge clk);
        if (cyc >= LAT - 1) begin
          med_hist[cyc-(LAT-1)] = median_o; sort_hist[cyc-(LAT-1)] = sorted_o;
          ro_hist[cyc-(LAT-1)] = r_o;
        end
        ri_hist[cyc] = r_i;
        cyc++;
      end
    end
    win_i = '0; r_i = 1'b0;
    for (int n = 0; n < LAT; n++) begin
      @(negedge clk);
      med_hist[cyc-(LAT-1)] = median_o; sort_hist[cyc-(LAT-1)] = sorted_o;
      ro_hist[cyc-(LAT-1)] = r_o; ri_hist[cyc] = 1'b0;
      cyc++;
    end

    for (int g = 0; g < starts.size(); g++) begin
      len = lens[g];
      for (int k = 0; k < NWIN; k++) ref_s[k] = words[g*NWIN+k];
      ref_s.rsort();
      gmed = '0;
      for (int l = 0; l < NL; l++) gline[l] = '0;
      for (int i = 0; i < len; i++) begin
        gmed[len-1-i] = med_hist[starts[g]+i];
        for (int l = 0; l < NL; l++) gline[l][len-1-i] = sort_hist[starts[g]+i][l];
      end
      checks++;
      if (gmed != ref_s[(NWIN-1)/2]) begin
        failures++;
        $display("FAIL window %0d len %0d median %h exp %h", g, len, gmed, ref_s[(NWIN-1)/2]);
      end
      ok = 1'b1;
      for (int l = 0; l < NL; l++) begin
        if (l < PAD_TOP)                  ok &= (gline[l] == w_t'((1 << len) - 1));
        else if (l < PAD_TOP + NWIN)      ok &= (gline[l] == ref_s[l-PAD_TOP]);
        else                              ok &= (gline[l] == '0);
      end
      checks++;
      if (!ok) begin
        failures++; $display("FAIL window %0d sorted lines", g);
      end
    end
    for (int c = 0; c < cyc - LAT; c++) begin
      checks++;
      if (ro_hist[c] !== ri_hist[c]) begin
        failures++; $display("FAIL r_o at %0d", c);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
