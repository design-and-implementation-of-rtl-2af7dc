// tb_rt_bitslice: self-checking testbench of one real-time sorter block.
//
// Part 1: every cell gets the equal state from above and a new random set of
// nine bits enters every clock. As a block alone then orders single bits,
// the output nine clocks later must hold as many 1s as the input, all at the
// top. Part 2: each cell gets a random state (pass, swap or equal) held
// steady together with a random input; after the network has settled, the
// sorted bits and every cell's outgoing state are compared with a reference
// model of the network written in the testbench.
module tb_rt_bitslice;
  localparam int WIN = 9, NP = (WIN - 1) / 2, NC = WIN * NP;

  logic clk = 1'b0;
  logic rst_n;
  logic [WIN-1:0] d_i, s_bits_o;
  logic [NC-1:0] s_i, e_i, s_o, e_o;
  int checks = 0, failures = 0;

  rt_bitslice dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // reference: the network with cell states fixed from above
  task automatic model(input logic [WIN-1:0] din, input logic [NC-1:0] si, ei,
                       output logic [WIN-1:0] dout, output logic [NC-1:0] so, eo);
    logic [WIN-1:0] v;
    v = din;
    for (int j = 0; j < WIN; j++) begin
      int ofs;
      ofs = j % 2;
      for (int p = 0; p < NP; p++) begin
        int c;
        logic a, b, sw;
        c = j * NP + p;
        a = v[ofs+2*p]; b = v[ofs+2*p+1];
        if (si[c])        sw = 1'b1;
        else if (!ei[c])  sw = 1'b0;
        else              sw = (!a && b);
        so[c] = sw;
        eo[c] = ei[c] && !si[c] && (a == b) || (si[c] && ei[c] && a == b);
        if (sw) begin v[ofs+2*p] = b; v[ofs+2*p+1] = a; end
      end
    end
    dout = v;
  endtask

  logic [WIN-1:0] hist [$];

  initial begin
    logic [WIN-1:0] exp_bits, inb;
    logic [NC-1:0] exp_s, exp_e, rs, re;
    rst_n = 1'b0; d_i = '0; s_i = '0; e_i = '1;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    // part 1: streaming, one new set per clock, result exactly WIN clocks later
    for (int n = 0; n < 1000 + WIN; n++) begin
      inb = WIN'($urandom);
      d_i = inb;
      hist.push_back(inb);
      @(negedge clk);
      if (n >= WIN - 1) begin
        logic [WIN-1:0] src;
        int ones;
        src = hist.pop_front();
        ones = $countones(src);
        exp_bits = '0;
        for (int k = 0; k < ones; k++) exp_bits[k] = 1'b1;
        checks++;
        if (s_bits_o !== exp_bits) begin
          failures++; $display("FAIL sort in=%b out=%b", src, s_bits_o);
        end
      end
    end
    // part 2: random held states
    for (int n = 0; n < 300; n++) begin
      for (int c = 0; c < NC; c++) begin
        int k;
        k = $urandom % 4;
        rs[c] = (k == 1) || (k == 3 && n % 2 == 0);
        re[c] = (k >= 2);
      end
      inb = WIN'($urandom);
      s_i = rs; e_i = re; d_i = inb;
      repeat (WIN + 1) @(negedge clk);
      model(inb, rs, re, exp_bits, exp_s, exp_e);
      checks++;
      if (s_bits_o !== exp_bits || s_o !== exp_s || e_o !== exp_e) begin
        failures++; $display("FAIL held states in=%b out=%b exp=%b", inb, s_bits_o, exp_bits);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
