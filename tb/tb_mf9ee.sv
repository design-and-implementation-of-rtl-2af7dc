// tb_mf9ee: self-checking testbench of one extensible median filter chip.
//
// Groups of nine random words are streamed in bit-serially, MSB first, back
// to back, with a different word length for each group (1 to 12 bits) and
// the word-end mark on the last bit. Upper extension inputs are held at 1 and
// lower ones at 0, as for a stand-alone window of 9. For each group the
// testbench rebuilds the nine output words from the bits seen WIN-1 clocks
// after the matching input bits and compares them with a software sort
// (largest first) and the median. This also checks the latency: the first
// sorted bit appears WIN clocks into the word, a full median after WIN+L
// clocks. It also checks that r_o follows r_i by WIN clocks, that the
// extension outputs stay at the tied values and that a low chip enable
// zeroes the sorted outputs.
module tb_mf9ee;
  localparam int WIN = 9;
  localparam int MAXC = 4000;

  logic clk = 1'b0;
  logic rst_n, ce, r_i, r_o, median_o;
  logic [WIN-1:0] d_i, s_o;
  logic [(WIN-1)/2-1:0] x_i, x_o;
  logic [(WIN+1)/2-1:0] y_i, y_o;
  int checks = 0, failures = 0;

  mf9ee dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (MAXC + 100) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // per-cycle history (index = cycle in which an input was applied)
  logic [WIN-1:0] out_hist [MAXC];
  logic           med_hist [MAXC];
  logic           ro_hist  [MAXC];
  logic           ri_hist  [MAXC];

  typedef logic [11:0] w_t;

  initial begin
    int cyc, g, len;
    int starts[$], lens[$];
    w_t words[$];
    w_t grp[WIN];
    w_t got[WIN], ref_s[WIN];
    logic gotm;
    w_t gotmed;

    rst_n = 1'b0; ce = 1'b1; r_i = 1'b0; d_i = '0;
    x_i = '1; y_i = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    cyc = 0;
    for (g = 0; g < 150; g++) begin
      len = (g < 12) ? g + 1 : 1 + ($urandom % 12);
      for (int k = 0; k < WIN; k++) begin
        grp[k] = w_t'($urandom) & w_t'((1 << len) - 1);
        if (g % 5 == 1 && k > 0) grp[k] = grp[0];           // ties
        words.push_back(grp[k]);
      end
      starts.push_back(cyc); lens.push_back(len);
      for (int i = len - 1; i >= 0; i--) begin
        for (int k = 0; k < WIN; k++) d_i[k] = grp[k][i];
        r_i = (i == 0);
        @(negedge clk);                 // edge "cyc" has sampled the inputs
        if (cyc >= WIN - 1) begin
          out_hist[cyc-(WIN-1)] = s_o; med_hist[cyc-(WIN-1)] = median_o;
          ro_hist[cyc-(WIN-1)] = r_o;
        end
        ri_hist[cyc] = r_i;
        cyc++;
        if (x_o !== '1 || y_o !== '0) begin
          failures++; $display("FAIL extension outputs %b %b", x_o, y_o);
        end
      end
    end
    // flush
    d_i = '0; r_i = 1'b0;
    for (int n = 0; n < WIN; n++) begin
      @(negedge clk);
      out_hist[cyc-(WIN-1)] = s_o; med_hist[cyc-(WIN-1)] = median_o;
      ro_hist[cyc-(WIN-1)] = r_o; ri_hist[cyc] = 1'b0;
      cyc++;
    end

    // compare every group
    for (g = 0; g < starts.size(); g++) begin
      len = lens[g];
      for (int k = 0; k < WIN; k++) ref_s[k] = words[g*WIN+k];
      ref_s.rsort();
      gotmed = '0;
      for (int k = 0; k < WIN; k++) got[k] = '0;
      for (int i = 0; i < len; i++) begin
        for (int k = 0; k < WIN; k++) got[k][len-1-i] = out_hist[starts[g]+i][k];
        gotm = med_hist[starts[g]+i];
        gotmed[len-1-i] = gotm;
      end
      checks++;
      if (got != ref_s || gotmed != ref_s[(WIN-1)/2]) begin
        failures++;
        $display("FAIL group %0d len %0d median got %h exp %h", g, len, gotmed, ref_s[(WIN-1)/2]);
      end
    end
    for (int c = 0; c < cyc - WIN; c++) begin
      checks++;
      if (ro_hist[c] !== ri_hist[c]) begin
        failures++; $display("FAIL r_o at %0d", c);
      end
    end

    // chip enable low: outputs forced to 0 while words keep flowing
    ce = 1'b0;
    for (int n = 0; n < 20; n++) begin
      d_i = WIN'($urandom); r_i = (n % 4 == 3);
      @(negedge clk);
      checks++;
      if (s_o !== '0 || median_o !== 1'b0) begin
        failures++; $display("FAIL ce=0 output %b", s_o);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
