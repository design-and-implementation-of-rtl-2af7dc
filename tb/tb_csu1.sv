// tb_csu1: self-checking testbench of the bit-serial compare-and-swap unit.
//
// Streams pairs of random words (length 1 to 10 bits, back to back, MSB first,
// with the word-end mark on the last bit) through one csu1 and checks, one
// clock later, that the upper output carries the larger word and the lower
// output the smaller one. Equal words and words differing only in the last
// bit are included on purpose. A watchdog ends a run that hangs.
module tb_csu1;
  logic clk = 1'b0;
  logic rst_n, r_i, a_i, b_i, a_o, b_o;
  int   checks = 0, failures = 0;

  csu1 dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run_pair(input int len, input logic [15:0] a, input logic [15:0] b);
    logic [15:0] hi, lo, got_a, got_b;
    hi = (a > b) ? a : b;
    lo = (a > b) ? b : a;
    got_a = '0; got_b = '0;
    for (int i = len - 1; i >= 0; i--) begin
      a_i = a[i]; b_i = b[i]; r_i = (i == 0);
      @(posedge clk); #1;
      got_a[i] = a_o; got_b[i] = b_o;
    end
    checks++;
    if (got_a != hi || got_b != lo) begin
      failures++;
      $display("FAIL len=%0d a=%h b=%h got %h/%h", len, a, b, got_a, got_b);
    end
  endtask

  initial begin
    rst_n = 1'b0; r_i = 1'b0; a_i = 1'b0; b_i = 1'b0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    run_pair(8, 8'h5a, 8'h5a);
    run_pair(8, 8'h00, 8'hff);
    run_pair(8, 8'hff, 8'h00);
    run_pair(8, 8'h80, 8'h7f);
    run_pair(8, 8'h7f, 8'h80);
    run_pair(8, 8'h12, 8'h13);
    run_pair(1, 1'b0, 1'b1);
    run_pair(1, 1'b1, 1'b0);
    for (int n = 0; n < 1500; n++) begin
      int len;
      logic [15:0] a, b;
      len = 1 + ($urandom % 10);
      a = 16'($urandom) & 16'((1 << len) - 1);
      b = (n % 4 == 0) ? a ^ 16'($urandom % 2) : 16'($urandom) & 16'((1 << len) - 1);
      run_pair(len, a, b);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
