// Testbench of the compact ASIC Salsa20 core: the known-answer block and
// random blocks, fed as four 128-bit rows, against the reference hash; the
// 16 keystream words must arrive in order, followed by done.
module tb_salsa20_compact;
  import salsa20_ref_pkg::*;

  logic clk = 0, rst = 1, start = 0, din_valid = 0, din_ready, ks_valid, done;
  logic [127:0] din = 0;
  logic [31:0] keystream;
  int checks = 0, failures = 0;

  salsa20_compact dut (.*);

  always #5 clk = ~clk;

  task automatic run(input logic [511:0] blk, input logic [511:0] exp);
    int w, cyc;
    @(negedge clk); start = 1; @(negedge clk); start = 0;
    for (int r = 0; r < 4; r++) begin
      din = blk[128*r +: 128]; din_valid = 1;
      while (!din_ready) @(negedge clk);
      @(negedge clk);
    end
    din_valid = 0;
    w = 0; cyc = 0;
    while (!done) begin
      if (ks_valid) begin
        checks++;
        if (w > 15 || keystream !== exp[32*w +: 32]) begin
          failures++; $display("FAIL word %0d: %h vs %h", w, keystream, exp[32*w +: 32]);
        end
        w++;
      end
      cyc++;
      @(negedge clk);
    end
    checks++; if (w != 16) begin failures++; $display("FAIL %0d words", w); end
    $display("block done after %0d cycles from last row", cyc);
  endtask

  initial begin
    repeat (3) @(negedge clk); rst = 0;
    run(kat_in(), KAT_OUT);
    for (int i = 0; i < 3; i++) begin
      logic [511:0] b;
      b = rand_block();
      run(b, hash(b));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
