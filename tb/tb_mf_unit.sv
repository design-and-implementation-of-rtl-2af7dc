// tb_mf_unit: end-to-end testbench of the median filter unit at its default
// parameters (one extensible chip, one real-time chip).
//
// A 12 x 20 image of 8-bit pixels is generated (a smooth ramp with
// salt-and-pepper impulses at pseudo-random places). Both filters remove the
// noise from it at the same time, each compared pixel by pixel with a 3x3
// median computed in the testbench:
//   * the real-time filter gets three image rows per pass, one column of
//     three pixels per clock, and gives one median per clock, 16 clocks late;
//   * the extensible filter gets the nine pixels of each window bit-serially,
//     8 clocks per window, back to back with the word-end mark on the last
//     bit, and gives each median 8 clocks after the window's first bit.
// After the image, the extensible filter also runs windows of 4-bit and
// 12-bit words (the same chip handles any word length), the real-time
// filter's test inputs put all its cells in pass, and each chip enable is
// dropped in turn; the outputs of a disabled filter must be 0 while the other
// keeps working. Each of these mechanisms is counted and must occur.
module tb_mf_unit;
  import mf_pkg::*;
  localparam int H = 12, WD = 20;
  localparam int LAT = RT_LATENCY;
  localparam int NW = WIN;            // signed copy for loop arithmetic

  logic clk = 1'b0;
  logic rst_n;
  logic ext_ce, ext_r_i, ext_r_o, ext_median_o;
  logic [WIN-1:0] ext_win_i, ext_sorted_o;
  logic rt_ce, rt_st_i, rt_et_i;
  logic [7:0] rt_x_i, rt_y_i, rt_z_i, rt_median_o;
  int checks = 0, failures = 0;
  int n_rt_med = 0, n_ext_med = 0, n_ext_len = 0, n_rt_pass = 0;
  int n_ext_off = 0, n_rt_off = 0;

  mf_unit dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [7:0] img [H][WD];

  function automatic logic [7:0] med3x3(input int r, input int c);
    logic [7:0] v[9];
    for (int i = 0; i < 3; i++)
      for (int j = 0; j < 3; j++) v[3*i+j] = img[r-1+i][c-1+j];
    v.sort();
    return v[4];
  endfunction

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++; $display("FAIL %s", what);
    end
  endtask

  // extensible filter: one group of nine len-bit words, result after WIN-1
  // clocks, left in ext_res
  logic [11:0] ext_res;
  task automatic ext_window(input logic [11:0] w [WIN], input int len);
    logic [11:0] got;
    logic [WIN-1:0] hist [$];
    got = '0;
    for (int i = len - 1; i >= -(NW - 1); i--) begin
      if (i >= 0) begin
        for (int k = 0; k < WIN; k++) ext_win_i[k] = w[k][i];
        ext_r_i = (i == 0);
      end else begin
        ext_win_i = '0; ext_r_i = 1'b0;
      end
      @(negedge clk);
      if (i + NW - 1 < len && i + NW - 1 >= 0) got[i + NW - 1] = ext_median_o;
    end
    ext_res = got;
  endtask

  task automatic run_ext_image();
    logic [11:0] w [WIN];
    logic [11:0] m;
    for (int r = 1; r < H - 1; r++)
      for (int c = 1; c < WD - 1; c++) begin
        for (int i = 0; i < 3; i++)
          for (int j = 0; j < 3; j++) w[3*i+j] = 12'(img[r-1+i][c-1+j]);
        ext_window(w, 8);
        m = ext_res;
        check(m[7:0] == med3x3(r, c), $sformatf("ext pixel %0d,%0d got %h exp %h", r, c, m, med3x3(r, c)));
        n_ext_med++;
      end
  endtask

  task automatic run_rt_image();
    logic [7:0] out [$];
    for (int r = 1; r < H - 1; r++) begin
      for (int n = 0; n < WD + LAT; n++) begin
        int c;
        c = (n < WD) ? n : WD - 1;
        rt_x_i = img[r-1][c]; rt_y_i = img[r][c]; rt_z_i = img[r+1][c];
        @(negedge clk);
        // column n-LAT completed the window centred on column n-LAT-1
        if (n - LAT >= 2 && n - LAT < WD) begin
          check(rt_median_o == med3x3(r, n - LAT - 1),
                $sformatf("rt pixel %0d,%0d got %0d", r, n - LAT - 1, rt_median_o));
          n_rt_med++;
        end
      end
    end
  endtask

  initial begin
    logic [11:0] w [WIN];
    logic [11:0] m, ref_v [WIN];
    rst_n = 1'b0;
    ext_ce = 1'b1; ext_r_i = 1'b0; ext_win_i = '0;
    rt_ce = 1'b1; rt_st_i = 1'b0; rt_et_i = 1'b1;
    rt_x_i = '0; rt_y_i = '0; rt_z_i = '0;
    for (int r = 0; r < H; r++)
      for (int c = 0; c < WD; c++) begin
        int h;
        h = (r * 37 + c * 91 + 13) % 17;
        img[r][c] = 8'(40 + 6 * r + 5 * c);
        if (h == 3) img[r][c] = 8'd255;
        if (h == 11) img[r][c] = 8'd0;
      end
    repeat (2) @(negedge clk);
    rst_n = 1'b1;

    // both filters on the image at the same time
    fork
      run_ext_image();
      run_rt_image();
    join

    // other word lengths on the extensible filter
    foreach (ext_lens[q]) begin
      for (int t = 0; t < 20; t++) begin
        for (int k = 0; k < WIN; k++) begin
          w[k] = 12'($urandom) & 12'((1 << ext_lens[q]) - 1);
          ref_v[k] = w[k];
        end
        ref_v.sort();
        ext_window(w, ext_lens[q]);
        m = ext_res;
        check(m == ref_v[4], $sformatf("ext len %0d", ext_lens[q]));
      end
      n_ext_len++;
    end

    // real-time test inputs: every cell in pass, output is the middle line
    rt_st_i = 1'b0; rt_et_i = 1'b0;
    for (int n = 0; n < 40; n++) begin
      rt_x_i = 8'($urandom); rt_y_i = 8'(n * 7); rt_z_i = 8'($urandom);
      @(negedge clk);
      if (n >= LAT + 1) begin
        check(rt_median_o == 8'((n - LAT - 1) * 7), "rt pass test mode");
        n_rt_pass++;
      end
    end
    rt_st_i = 1'b0; rt_et_i = 1'b1;

    // chip enables: each filter disabled while the other keeps filtering
    ext_ce = 1'b0;
    fork
      for (int n = 0; n < 32; n++) begin   // whole 8-bit words
        ext_win_i = WIN'($urandom); ext_r_i = (n % 8 == 7);
        @(negedge clk);
        check(ext_median_o == 1'b0 && ext_sorted_o == '0, "ext disabled");
        n_ext_off++;
      end
      run_rt_image();
    join
    ext_ce = 1'b1; rt_ce = 1'b0;
    fork
      run_ext_image();
      for (int n = 0; n < 30; n++) begin
        rt_x_i = 8'($urandom); rt_y_i = 8'($urandom); rt_z_i = 8'($urandom);
        @(negedge clk);
        check(rt_median_o == '0, "rt disabled");
        n_rt_off++;
      end
    join

    $display("mechanisms: rt medians=%0d ext medians=%0d ext word lengths=%0d rt pass mode=%0d ext off=%0d rt off=%0d",
             n_rt_med, n_ext_med, n_ext_len + 1, n_rt_pass, n_ext_off, n_rt_off);
    check(n_rt_med > 0 && n_ext_med > 0 && n_ext_len > 0 && n_rt_pass > 0 &&
          n_ext_off > 0 && n_rt_off > 0, "every mechanism occurred");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int ext_lens [2] = '{4, 12};
endmodule
