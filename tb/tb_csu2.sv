// tb_csu2: self-checking testbench of the real-time compare-and-swap cell.
//
// Applies all 16 combinations of incoming state (S, E) and bit pair (A, B)
// in random order, many times, and checks the registered outputs against the
// cell's behaviour: in the equal state the bit pair decides (A>B pass, A<B
// swap, equal stays equal); pass and swap are kept and route the bits
// straight or crossed; the unused code S=1,E=1 acts as swap.
module tb_csu2;
  logic clk = 1'b0;
  logic rst_n, s_i, e_i, a_i, b_i, s_o, e_o, a_o, b_o;
  int   checks = 0, failures = 0;

  csu2 dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic swap, eq_next;
    logic [3:0] v;
    rst_n = 1'b0; {s_i, e_i, a_i, b_i} = '0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    for (int n = 0; n < 640; n++) begin
      v = (n < 16) ? 4'(n) : 4'($urandom);
      {s_i, e_i, a_i, b_i} = v;
      // reference behaviour
      if (s_i)                    begin swap = 1'b1; eq_next = 1'b0; end
      else if (!e_i)              begin swap = 1'b0; eq_next = 1'b0; end
      else if (a_i == b_i)        begin swap = 1'b0; eq_next = 1'b1; end
      else                        begin swap = b_i;  eq_next = 1'b0; end
      if (s_i && e_i) eq_next = (a_i == b_i);
      @(posedge clk); #1;
      checks++;
      if (s_o !== swap || e_o !== eq_next ||
          a_o !== (swap ? b_i : a_i) || b_o !== (swap ? a_i : b_i)) begin
        failures++;
        $display("FAIL in=%b out s=%b e=%b a=%b b=%b", v, s_o, e_o, a_o, b_o);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
