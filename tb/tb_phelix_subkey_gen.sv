// Testbench of phelix_subkey_gen: random keys, nonces and key lengths, for
// block numbers -8..40 and random large (also negative) block numbers,
// against the reference subkey formulas.
module tb_phelix_subkey_gen;
  import phelix_ref_pkg::*;

  logic clk = 0, rst = 1, start = 0;
  logic [255:0] k = 0, n = 0;
  logic [31:0] lu4 = 0, ihigh32 = 0, ilow32 = 0, x0, x1;
  int checks = 0, failures = 0;

  phelix_subkey_gen dut (.*);

  always #5 clk = ~clk;

  task automatic one(longint i, int len);
    logic [31:0] e0, e1;
    lu4 = 32'(4 * len);
    {ihigh32, ilow32} = i;
    subkeys(k, n, len, i, e0, e1);
    start = 1; @(negedge clk); start = 0;
    checks++;
    if (x0 !== e0 || x1 !== e1) begin failures++; $display("FAIL i=%0d: %h %h vs %h %h", i, x0, x1, e0, e1); end
  endtask

  initial begin
    repeat (3) @(negedge clk); rst = 0;
    for (int t = 0; t < 5; t++) begin
      int len;
      len = $urandom_range(0, 32);
      for (int j = 0; j < 8; j++) begin k[32*j +: 32] = $urandom; n[32*j +: 32] = $urandom; end
      for (longint i = -8; i <= 40; i++) one(i, len);
      for (int j = 0; j < 20; j++) one(longint'({$urandom, $urandom}), len);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
