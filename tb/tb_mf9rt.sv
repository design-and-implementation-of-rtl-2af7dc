// tb_mf9rt: self-checking testbench of the real-time 3x3 median filter.
//
// A new random column of three 8-bit samples enters every clock (with
// stretches of flat and of extreme values to give ties and full-range
// words). Sixteen clocks after each column the output must equal the median
// of that column and the two before it, computed in the testbench by sorting.
// This checks both the result and the one-median-per-clock rate with its
// fixed latency. Then the test inputs are used: with st_i=0, et_i=0 every
// cell of every block stays in pass, so the output must be the sample that
// sits on the middle line of the window (row 2, one column old). Last, a low
// chip enable must force the output to 0.
module tb_mf9rt;
  import mf_pkg::*;
  localparam int W = RT_WORD;
  localparam int LAT = RT_LATENCY;

  logic clk = 1'b0;
  logic rst_n, ce, st_i, et_i;
  logic [W-1:0] x_i, y_i, z_i, median_o;
  int checks = 0, failures = 0;

  mf9rt dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  typedef logic [W-1:0] w_t;
  w_t xh [$], yh [$], zh [$];

  function automatic w_t med9(input int n);
    w_t v[9];
    for (int a = 0; a < 3; a++) begin
      v[3*a]   = xh[n-a];
      v[3*a+1] = yh[n-a];
      v[3*a+2] = zh[n-a];
    end
    v.sort();
    return v[4];
  endfunction

  function automatic w_t rnd(input int n);
    if ((n / 50) % 4 == 1) return w_t'($urandom % 3) + 8'd100;
    if ((n / 50) % 4 == 2) return ($urandom % 2) ? '1 : '0;
    return w_t'($urandom);
  endfunction

  initial begin
    int n;
    rst_n = 1'b0; ce = 1'b1; st_i = 1'b0; et_i = 1'b1;
    x_i = '0; y_i = '0; z_i = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    // normal operation: one column per clock, column n sampled at edge n
    for (n = 0; n < 1000 + LAT; n++) begin
      x_i = rnd(n); y_i = rnd(n); z_i = rnd(n);
      xh.push_back(x_i); yh.push_back(y_i); zh.push_back(z_i);
      @(negedge clk);
      // output now reflects edge n, i.e. the column sampled LAT edges earlier
      if (n >= LAT + 2) begin
        checks++;
        if (median_o !== med9(n - LAT)) begin
          failures++;
          $display("FAIL column %0d median %0d exp %0d", n - LAT, median_o, med9(n - LAT));
        end
      end
    end
    // test mode: all cells forced to pass
    st_i = 1'b0; et_i = 1'b0;
    for (int m = 0; m < 100 + LAT; m++, n++) begin
      x_i = rnd(m); y_i = rnd(m); z_i = rnd(m);
      xh.push_back(x_i); yh.push_back(y_i); zh.push_back(z_i);
      @(negedge clk);
      if (m >= LAT + 2) begin
        checks++;
        if (median_o !== yh[n - LAT - 1]) begin
          failures++; $display("FAIL pass test mode %0d exp %0d", median_o, yh[n - LAT - 1]);
        end
      end
    end
    // chip enable low
    st_i = 1'b0; et_i = 1'b1; ce = 1'b0;
    for (int m = 0; m < 30; m++) begin
      x_i = rnd(m); y_i = rnd(m); z_i = rnd(m);
      @(negedge clk);
      checks++;
      if (median_o !== '0) begin
        failures++; $display("FAIL ce=0 output %0d", median_o);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
