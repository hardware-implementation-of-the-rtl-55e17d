// Testbench of the compact FPGA Salsa20 core: random key, nonce and block
// counter; the 16 keystream words must equal the reference hash of the
// standard input matrix, in order, and a block must take 1362 cycles from
// the start edge to done.
module tb_salsa20_fpga;
  import salsa20_ref_pkg::*;

  logic clk = 0, rst = 1, start = 0, ks_valid, done;
  logic [127:0] key = 0;
  logic [63:0] nonce = 0, counter = 0;
  logic [31:0] keystream;
  int checks = 0, failures = 0;

  salsa20_fpga dut (.*);

  always #5 clk = ~clk;

  task automatic run();
    logic [511:0] exp;
    int w = 0, cyc = 0;
    key = {$urandom, $urandom, $urandom, $urandom};
    nonce = {$urandom, $urandom};
    counter = {$urandom, $urandom};
    exp = hash(matrix(key, nonce, counter));
    @(negedge clk); start = 1; @(negedge clk); start = 0;
    cyc = 1;
    forever begin
      if (ks_valid) begin
        checks++;
        if (w > 15 || keystream !== exp[32*w +: 32]) begin
          failures++; $display("FAIL word %0d: %h vs %h", w, keystream, exp[32*w +: 32]);
        end
        w++;
      end
      if (done) break;
      @(negedge clk); cyc++;
    end
    checks++; if (w != 16) begin failures++; $display("FAIL %0d words", w); end
    checks++; if (cyc != 1362) begin failures++; $display("FAIL %0d cycles", cyc); end
  endtask

  initial begin
    repeat (3) @(negedge clk); rst = 0;
    for (int i = 0; i < 3; i++) run();
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
