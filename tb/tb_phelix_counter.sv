// Testbench of phelix_counter: clear to -8, counting with gaps in inc,
// crossing zero, and clear taking priority over inc.
module tb_phelix_counter;
  logic clk = 0, clear = 0, inc = 0;
  logic [63:0] q;
  longint exp;
  int checks = 0, failures = 0;

  phelix_counter dut (.*);

  always #5 clk = ~clk;

  initial begin
    @(negedge clk); clear = 1; @(negedge clk); clear = 0; exp = -8;
    checks++; if (q !== 64'(exp)) begin failures++; $display("FAIL clear %h", q); end
    for (int t = 0; t < 100; t++) begin
      inc = $urandom_range(0, 1);
      @(negedge clk);
      if (inc) exp++;
      checks++; if (q !== 64'(exp)) begin failures++; $display("FAIL q %h vs %h", q, exp); end
    end
    inc = 1; clear = 1; @(negedge clk); clear = 0; inc = 0;
    checks++; if (q !== 64'(-8)) begin failures++; $display("FAIL priority"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
