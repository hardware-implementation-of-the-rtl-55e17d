// Testbench of the pipelined Salsa20 core at its full 20 stages: a burst
// of back-to-back blocks (one per clock), a gap, and a second burst; every
// output must match the reference hash, in order, STAGES+1 cycles after
// its input, with one output per clock inside a burst.
module tb_salsa20_fast;
  import salsa20_ref_pkg::*;

  localparam int STAGES = 20;
  logic clk = 0, rst = 1, in_valid = 0, out_valid;
  logic [511:0] din = 0, keystream;
  logic [511:0] exp_q [$];
  int sent_at [$];
  int checks = 0, failures = 0, cyc = 0, sent = 0, got = 0, back_to_back = 0;
  logic prev_valid = 0;

  salsa20_fast dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cyc++;

  always @(negedge clk) begin
    if (out_valid) begin
      checks++;
      if (exp_q.size() == 0 || keystream !== exp_q[0] || cyc - sent_at[0] != STAGES + 1) begin
        failures++; $display("FAIL output %0d at cycle %0d", got, cyc);
      end
      if (exp_q.size() != 0) begin void'(exp_q.pop_front()); void'(sent_at.pop_front()); end
      if (prev_valid) back_to_back++;
      got++;
    end
    prev_valid <= out_valid;
  end

  task automatic burst(input int n);
    for (int i = 0; i < n; i++) begin
      logic [511:0] b;
      b = (sent == 0) ? kat_in() : rand_block();
      @(negedge clk);
      in_valid = 1; din = b;
      exp_q.push_back(hash(b)); sent_at.push_back(cyc); sent++;
    end
    @(negedge clk); in_valid = 0;
  endtask

  initial begin
    repeat (3) @(negedge clk); rst = 0;
    burst(30);
    repeat (5) @(negedge clk);
    burst(10);
    repeat (STAGES + 5) @(negedge clk);
    checks++; if (got != sent) begin failures++; $display("FAIL %0d of %0d outputs", got, sent); end
    checks++; if (back_to_back < 30) begin failures++; $display("FAIL throughput"); end
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
