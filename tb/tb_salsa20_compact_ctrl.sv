// Testbench of salsa20_compact_ctrl. Simple responders stand in for the
// memory (done one cycle after each start) and the quarterround block
// (done a few cycles after its start). Checks the load beats, the
// sequence of 80 group addresses (column groups in even rounds, row groups
// in odd rounds, each read before it is written back), the 16 output
// words, done, and that qr_ce toggles.
module tb_salsa20_compact_ctrl;
  logic clk = 0, rst = 1, start = 0, din_valid = 0;
  logic din_ready, mem_done = 0, quarter_done = 0, m0_start, m1_start, serial, load_all, we, mux;
  logic quarter_rd_start, qr_ce, ks_valid, done;
  logic [2:0] addr, last_rd;
  int checks = 0, failures = 0, loads = 0, reads = 0, writes = 0, qrs = 0, words = 0, ce_hi = 0;
  int qr_cnt = -1;

  salsa20_compact_ctrl dut (.*);

  always #5 clk = ~clk;

  always @(posedge clk) begin
    mem_done <= m0_start;
    quarter_done <= 1'b0;
    if (quarter_rd_start) qr_cnt <= 7;
    else if (qr_cnt > 0) qr_cnt <= qr_cnt - 1;
    else if (qr_cnt == 0) begin quarter_done <= 1'b1; qr_cnt <= -1; end
    if (qr_ce) ce_hi++;
    if (!rst && m0_start) begin
      if (load_all) begin
        checks++;
        if (!m1_start || addr != 3'(loads)) begin failures++; $display("FAIL load beat %0d addr %0d", loads, addr); end
        loads++;
      end else if (we) begin
        checks++;
        if (!mux || addr != last_rd) begin failures++; $display("FAIL write addr %0d after read %0d", addr, last_rd); end
        writes++;
      end else if (serial) begin
        words++;
      end else begin
        checks++;
        // op n = reads: round n/4, group n%4 (+4 in odd rounds)
        if (addr != {3'((reads / 4) % 2 == 1), 2'(reads % 4)}) begin
          failures++; $display("FAIL read %0d addr %0d", reads, addr);
        end
        last_rd <= addr;
        reads++;
      end
    end
    if (quarter_rd_start) qrs++;
  end

  initial begin
    int kv = 0, cyc = 0;
    repeat (3) @(negedge clk); rst = 0;
    @(negedge clk); start = 1; @(negedge clk); start = 0; din_valid = 1;
    while (!done) begin
      @(negedge clk);
      if (ks_valid) kv++;
      cyc++;
    end
    din_valid = 0;
    checks++; if (loads != 4) begin failures++; $display("FAIL loads %0d", loads); end
    checks++; if (reads != 80 || writes != 80 || qrs != 80) begin
      failures++; $display("FAIL reads %0d writes %0d qrs %0d", reads, writes, qrs); end
    checks++; if (words != 16 || kv != 16) begin failures++; $display("FAIL words %0d ks %0d", words, kv); end
    checks++; if (ce_hi < cyc / 3) begin failures++; $display("FAIL qr_ce"); end
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
