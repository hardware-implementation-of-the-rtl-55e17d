// Testbench of the iterative ASIC Salsa20 core: the known-answer block and
// random blocks against the reference hash; ready must rise exactly 40
// clock edges after the start edge.
module tb_salsa20_iterative;
  import salsa20_ref_pkg::*;

  logic clk = 0, rst = 1, start = 0, ready;
  logic [511:0] din = 0, keystream;
  int checks = 0, failures = 0;

  salsa20_iterative dut (.*);

  always #5 clk = ~clk;

  task automatic run(input logic [511:0] blk, input logic [511:0] exp);
    int cyc;
    @(negedge clk); start = 1; din = blk;
    @(negedge clk); start = 0; din = '0;
    cyc = 1;
    while (!ready) begin @(negedge clk); cyc++; end
    checks++; if (keystream !== exp) begin failures++; $display("FAIL block %h", blk[31:0]); end
    checks++; if (cyc != 40) begin failures++; $display("FAIL latency %0d", cyc); end
  endtask

  initial begin
    repeat (3) @(negedge clk); rst = 0;
    run(kat_in(), KAT_OUT);
    for (int i = 0; i < 20; i++) begin
      logic [511:0] b;
      b = rand_block();
      run(b, hash(b));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
