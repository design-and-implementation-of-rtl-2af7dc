// tb_ee_frame: a 512 x 512 frame of 4-bit pixels through one extensible
// median filter chip, windows back to back.
//
// The frame is generated from a formula (a ramp with salt-and-pepper
// impulses). Every 3x3 window of the frame, row by row, is sent bit-serially
// as nine 4-bit words, MSB first, with the word-end mark on the last bit and
// no idle clock between windows, so the chip delivers one 4-bit median every
// 4 clocks. Each median is rebuilt from the output bits, 8 clocks after the
// matching input bits, and compared with a software median. The total clock
// count must be exactly 4 per window plus the pipeline fill.
module tb_ee_frame;
  localparam int N = 512, L = 4, WIN = 9;
  localparam int NWINDOWS = (N - 2) * (N - 2);

  logic clk = 1'b0;
  logic rst_n, ce, r_i, r_o, median_o;
  logic [WIN-1:0] d_i, s_o;
  logic [3:0] x_i, x_o;
  logic [4:0] y_i, y_o;
  int checks = 0, failures = 0;
  longint cycles = 0;

  mf9ee dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (L * NWINDOWS + 100) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [3:0] pix(input int r, input int c);
    int h;
    h = ((r * 7919) ^ (c * 104729)) % 41;
    if (h < 0) h = -h;
    if (h == 1) return 4'hf;
    if (h == 2) return 4'h0;
    return 4'(1 + ((r + c) / 80) % 14);
  endfunction

  initial begin
    logic [3:0] w [WIN];
    logic [3:0] s [WIN];
    logic [3:0] expq [$];
    logic [3:0] acc;
    int nout;
    rst_n = 1'b0; ce = 1'b1; r_i = 1'b0; d_i = '0;
    x_i = '1; y_i = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    acc = '0; nout = 0;
    for (int k = 0; k < NWINDOWS + 3; k++) begin
      int r, c;
      r = 1 + k / (N - 2); c = 1 + k % (N - 2);
      if (k < NWINDOWS) begin
        for (int i = 0; i < 3; i++)
          for (int j = 0; j < 3; j++) w[3*i+j] = pix(r - 1 + i, c - 1 + j);
        s = w; s.sort();
        expq.push_back(s[4]);
      end else begin
        for (int i = 0; i < WIN; i++) w[i] = '0;
      end
      for (int b = L - 1; b >= 0; b--) begin
        for (int i = 0; i < WIN; i++) d_i[i] = w[i][b];
        r_i = (b == 0);
        @(negedge clk);
        // the output now carries the bit applied WIN-1 clocks earlier
        if (cycles >= WIN - 1 && nout < NWINDOWS) begin
          int t;
          t = int'(cycles) - (WIN - 1);
          acc[L - 1 - (t % L)] = median_o;
          if (t % L == L - 1) begin
            logic [3:0] e;
            e = expq.pop_front();
            checks++;
            if (acc !== e) begin
              failures++;
              if (failures < 10) $display("FAIL window %0d got %h exp %h", nout, acc, e);
            end
            nout++;
          end
        end
        cycles++;
      end
    end
    $display("frame %0dx%0d, %0d-bit: %0d medians in %0d clocks", N, N, L, nout, cycles);
    checks++;
    if (nout != NWINDOWS || cycles != longint'(L) * (NWINDOWS + 3)) begin
      failures++; $display("FAIL count of medians or clocks");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
