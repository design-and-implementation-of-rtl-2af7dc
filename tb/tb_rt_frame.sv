// tb_rt_frame: one full 1024 x 1024 frame of 8-bit pixels through the
// real-time median filter.
//
// The frame is generated from a formula: a diagonal ramp with a bright
// square, plus salt-and-pepper impulses where a hash of the pixel position
// says so. It is filtered in bands of three rows: for each output row the
// three source rows enter one column per clock, back to back with no idle
// clock inside a row, and every median of a full 3x3 window is compared with
// a software median. Only 3 rows of the frame are held in the testbench at a
// time. As a new column enters every clock and every median is checked at
// the fixed latency, the rate of one median per clock is checked too. The
// testbench also counts the impulses left in the output (there must be far
// fewer than in the input).
module tb_rt_frame;
  import mf_pkg::*;
  localparam int N = 1024;
  localparam int LAT = RT_LATENCY;

  logic clk = 1'b0;
  logic rst_n, ce, st_i, et_i;
  logic [7:0] x_i, y_i, z_i, median_o;
  int checks = 0, failures = 0;
  longint noisy_in = 0, noisy_out = 0, cycles = 0;

  mf9rt dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (1100 * N) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [7:0] pix(input int r, input int c);
    int h, v;
    h = ((r * 7919) ^ (c * 104729) ^ (r * c * 31)) % 53;
    if (h < 0) h = -h;
    if (h == 1) return 8'd255;
    if (h == 2) return 8'd0;
    v = (r + c) / 8;
    if (r > 300 && r < 700 && c > 300 && c < 700) v = v + 60;
    return 8'(v > 250 ? 250 : (v < 5 ? 5 : v));
  endfunction

  function automatic logic [7:0] med(input logic [7:0] v [9]);
    logic [7:0] s [9];
    s = v;
    s.sort();
    return s[4];
  endfunction

  initial begin
    logic [7:0] win [9];
    logic [7:0] expq [$];
    rst_n = 1'b0; ce = 1'b1; st_i = 1'b0; et_i = 1'b1;
    x_i = '0; y_i = '0; z_i = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int r = 1; r < N - 1; r++) begin
      // one output row: N columns plus LAT clocks for the pipeline to drain
      for (int n = 0; n < N + LAT; n++) begin
        int c;
        c = (n < N) ? n : N - 1;
        x_i = pix(r - 1, c); y_i = pix(r, c); z_i = pix(r + 1, c);
        if (n < N && (y_i == 8'd255 || y_i == 8'd0)) noisy_in++;
        if (n >= 2 && n < N) begin
          for (int i = 0; i < 3; i++)
            for (int j = 0; j < 3; j++) win[3*i+j] = pix(r - 1 + i, n - 2 + j);
          expq.push_back(med(win));
        end
        @(negedge clk);
        cycles++;
        if (n - LAT >= 2 && n - LAT < N) begin
          logic [7:0] e;
          e = expq.pop_front();
          checks++;
          if (median_o !== e) begin
            failures++;
            if (failures < 10) $display("FAIL row %0d col %0d got %0d exp %0d", r, n - LAT - 1, median_o, e);
          end
          if (median_o == 8'd255 || median_o == 8'd0) noisy_out++;
        end
      end
    end
    $display("frame %0dx%0d: %0d medians checked in %0d clocks, impulses in %0d out %0d",
             N, N, checks, cycles, noisy_in, noisy_out);
    checks++;
    if (!(noisy_out * 10 < noisy_in)) begin
      failures++; $display("FAIL noise not removed");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
