// Testbench of phelix_fifo: random push/pop traffic against a queue model,
// including simultaneous push and pop on a full FIFO, and ignored pushes
// when full and pops when empty.
module tb_phelix_fifo;
  logic clk = 0, rst = 1, push = 0, pop = 0;
  logic [31:0] din = 0, dout;
  logic [2:0] count;
  logic [31:0] q [$];
  int checks = 0, failures = 0, full_pushpop = 0;

  phelix_fifo dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (3) @(negedge clk); rst = 0;
    for (int t = 0; t < 2000; t++) begin
      push = $urandom_range(0, 1); pop = $urandom_range(0, 1); din = $urandom;
      checks++;
      if (count != q.size() || (q.size() > 0 && dout !== q[0])) begin
        failures++; $display("FAIL count %0d/%0d dout %h", count, q.size(), dout);
      end
      if (push && pop && q.size() == 4) full_pushpop++;
      @(negedge clk);
      begin
        bit dp, du;
        dp = pop && q.size() > 0;
        du = push && (q.size() < 4 || dp);
        if (dp) void'(q.pop_front());
        if (du) q.push_back(din);
      end
    end
    checks++; if (full_pushpop == 0) begin failures++; $display("FAIL full push+pop never seen"); end
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
