// tb_adaptive_window: window sizes from 3 to 33 on single extensible chips
// and on grids of them.
//
// The same bit-serial filter serves any window size: unused lines are driven
// with ones above and zeros below the samples. This testbench runs, side by
// side, a single chip with windows of 3, 7 and 9, a 2 x 2 grid with 11 and 17
// (its limit, 8*2+1), a 3 x 3 grid with 19 and 25, and a 4 x 4 grid with 33
// (8*4+1). Each is checked against a software sort, median and all sorted
// sample lines, by a tb_grid_checker instance.
module tb_adaptive_window;
  localparam int N = 8;
  logic clk = 1'b0;
  logic rst_n = 1'b1;
  logic done [N];
  int   c [N], f [N];
  int   checks = 0, failures = 0;

  always #5 clk = ~clk;

  tb_grid_checker #(.ROWS(1), .COLS(1), .NWIN(3))  u0 (.clk, .rst_n, .done(done[0]), .checks(c[0]), .failures(f[0]));
  tb_grid_checker #(.ROWS(1), .COLS(1), .NWIN(7))  u1 (.clk, .rst_n, .done(done[1]), .checks(c[1]), .failures(f[1]));
  tb_grid_checker #(.ROWS(1), .COLS(1), .NWIN(9))  u2 (.clk, .rst_n, .done(done[2]), .checks(c[2]), .failures(f[2]));
  tb_grid_checker #(.ROWS(2), .COLS(2), .NWIN(11)) u3 (.clk, .rst_n, .done(done[3]), .checks(c[3]), .failures(f[3]));
  tb_grid_checker #(.ROWS(2), .COLS(2), .NWIN(17)) u4 (.clk, .rst_n, .done(done[4]), .checks(c[4]), .failures(f[4]));
  tb_grid_checker #(.ROWS(3), .COLS(3), .NWIN(19)) u5 (.clk, .rst_n, .done(done[5]), .checks(c[5]), .failures(f[5]));
  tb_grid_checker #(.ROWS(3), .COLS(3), .NWIN(25)) u6 (.clk, .rst_n, .done(done[6]), .checks(c[6]), .failures(f[6]));
  tb_grid_checker #(.ROWS(4), .COLS(4), .NWIN(33)) u7 (.clk, .rst_n, .done(done[7]), .checks(c[7]), .failures(f[7]));

  initial begin
    repeat (3000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst_n = 1'b1;
    @(negedge clk) rst_n = 1'b0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < N; i++) wait (done[i]);
    for (int i = 0; i < N; i++) begin
      checks += c[i];
      failures += f[i];
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
