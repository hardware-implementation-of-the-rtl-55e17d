// Testbench of the microprogrammed controller: counts the control words it
// issues in one run and checks them against the program's structure (32
// load writes, 10 passes of 32 quarterround steps, 16 keystream loads),
// the total length, the loop jumps, done, and a second run after it.
module tb_salsa20_ucode_ctrl;
  import salsa20_ucode_pkg::*;

  logic clk = 0, rst = 1, start = 0, busy, done;
  uinst_t uinst;
  int checks = 0, failures = 0;

  salsa20_ucode_ctrl dut (.*);

  always #5 clk = ~clk;

  task automatic run();
    int issued = 0, ld_res = 0, ld_ks = 0, loops = 0, loads = 0, halts = 0, rot_cnt [4];
    rot_cnt = '{0, 0, 0, 0};
    @(negedge clk); start = 1; @(negedge clk); start = 0;
    forever begin
      if (busy) issued++;
      if (uinst.ld_res) begin ld_res++; rot_cnt[uinst.rsel]++; end
      if (uinst.ld_ks) ld_ks++;
      if (uinst.loop_end) loops++;
      if (uinst.halt) halts++;
      if (uinst.we1 && uinst.src != SRC_RES) loads++;
      if (done) break;
      @(negedge clk);
    end
    checks++; if (issued != 1361) begin failures++; $display("FAIL issued %0d", issued); end
    checks++; if (ld_res != 320) begin failures++; $display("FAIL steps %0d", ld_res); end
    for (int r = 0; r < 4; r++) begin
      checks++; if (rot_cnt[r] != 80) begin failures++; $display("FAIL rotation %0d used %0d", r, rot_cnt[r]); end
    end
    checks++; if (ld_ks != 16) begin failures++; $display("FAIL ks loads %0d", ld_ks); end
    checks++; if (loops != 10) begin failures++; $display("FAIL loops %0d", loops); end
    checks++; if (loads != 32) begin failures++; $display("FAIL loads %0d", loads); end
    checks++; if (halts != 1) begin failures++; $display("FAIL halts %0d", halts); end
  endtask

  initial begin
    repeat (3) @(negedge clk); rst = 0;
    run();
    run();
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
