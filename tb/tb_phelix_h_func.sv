// Testbench of phelix_h_func: random states and key words against the
// reference H; done must come ten cycles after the start edge and wout must
// hold afterwards.
module tb_phelix_h_func;
  import phelix_ref_pkg::*;

  logic clk = 0, rst = 1, start = 0, done;
  logic [159:0] win = 0, wout;
  logic [31:0] k0 = 0, k1 = 0;
  int checks = 0, failures = 0;

  phelix_h_func dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (3) @(negedge clk); rst = 0;
    for (int t = 0; t < 300; t++) begin
      logic [159:0] exp;
      int cyc;
      win = {$urandom, $urandom, $urandom, $urandom, $urandom};
      k0 = (t % 3 == 0) ? 0 : $urandom;
      k1 = (t % 5 == 0) ? 0 : $urandom;
      exp = pack5(H(unpack5(win), k0, k1));
      @(negedge clk); start = 1; @(negedge clk); start = 0; cyc = 1;
      while (!done) begin @(negedge clk); cyc++; end
      checks++; if (wout !== exp) begin failures++; $display("FAIL H(%h)", win); end
      checks++; if (cyc != 11) begin failures++; $display("FAIL latency %0d", cyc); end
      repeat (2) @(negedge clk);
      checks++; if (wout !== exp) begin failures++; $display("FAIL hold"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
