// Testbench of phelix_n_expand: random nonces against the reference
// expansion; the output must change only on start.
module tb_phelix_n_expand;
  import phelix_ref_pkg::*;

  logic clk = 0, rst = 1, start = 0;
  logic [127:0] n_in = 0;
  logic [255:0] n, exp;
  int checks = 0, failures = 0;

  phelix_n_expand dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (3) @(negedge clk); rst = 0;
    for (int t = 0; t < 100; t++) begin
      n_in = {$urandom, $urandom, $urandom, $urandom};
      if (t == 0) n_in = '0;
      exp = n_expand(n_in);
      start = 1; @(negedge clk); start = 0;
      checks++; if (n !== exp) begin failures++; $display("FAIL %h -> %h", n_in, n); end
      n_in = ~n_in; @(negedge clk);
      checks++; if (n !== exp) begin failures++; $display("FAIL hold"); end
    end
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
