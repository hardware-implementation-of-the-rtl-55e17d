// Throughput testbench: runs each of the five cores in salsa20_phelix_top
// (default parameters) on back-to-back work and measures the steady-state
// cycles per output block or word:
//   compact ASIC Salsa20   1157 cycles per 512-bit block (start to done)
//   iterative Salsa20        40 cycles per block
//   pipelined Salsa20         1 cycle per block
//   FPGA Salsa20           1362 cycles per block
//   Phelix                   26 cycles per 32-bit word
// and prints the resulting rates at the clock frequencies quoted for the
// original implementations (250 MHz for the compact ASIC, a 7 ns clock for
// Phelix). The outputs themselves are checked by the other testbenches;
// here the first word of each block is spot-checked against the reference.
module tb_cipher_throughput;
  import salsa20_ref_pkg::*;
  import phelix_ref_pkg::*;

  logic clk = 0, rst = 1;
  logic cs_start = 0, cs_din_valid = 0, cs_din_ready, cs_ks_valid, cs_done;
  logic [127:0] cs_din = 0;
  logic [31:0] cs_keystream;
  logic it_start = 0, it_ready;
  logic [511:0] it_din = 0, it_keystream;
  logic fs_in_valid = 0, fs_out_valid;
  logic [511:0] fs_din = 0, fs_keystream;
  logic fp_start = 0, fp_ks_valid, fp_done;
  logic [127:0] fp_key = 0;
  logic [63:0] fp_nonce = 0, fp_counter = 0;
  logic [31:0] fp_keystream;
  logic ph_start = 0, ph_ready, ph_pt_valid = 0, ph_pt_ready, ph_ks_valid;
  logic [255:0] ph_key = 0;
  logic [5:0] ph_key_len = 0;
  logic [127:0] ph_nonce = 0;
  logic [31:0] ph_pt = 0, ph_keystream, ph_ct;

  int checks = 0, failures = 0;
  longint cyc = 0;

  salsa20_phelix_top dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cyc++;

  task automatic expect_eq(string what, longint got, longint exp);
    checks++;
    if (got != exp) begin failures++; $display("FAIL %s: %0d, expected %0d", what, got, exp); end
  endtask

  task automatic compact_blocks();
    longint t0, t1;
    logic [511:0] b, e;
    for (int k = 0; k < 2; k++) begin
      b = rand_block(); e = hash(b);
      @(negedge clk); t0 = cyc; cs_start = 1; @(negedge clk); cs_start = 0;
      for (int r = 0; r < 4; r++) begin
        cs_din = b[128*r +: 128]; cs_din_valid = 1;
        while (!cs_din_ready) @(negedge clk);
        @(negedge clk);
      end
      cs_din_valid = 0;
      while (!cs_ks_valid) @(negedge clk);
      checks++; if (cs_keystream !== e[31:0]) begin failures++; $display("FAIL compact word"); end
      while (!cs_done) @(negedge clk);
      t1 = cyc;
    end
    expect_eq("compact cycles/block", t1 - t0, 1157);
    $display("compact ASIC Salsa20: %0d cycles/block, %0.1f Mbit/s at 250 MHz", t1 - t0,
             512.0 * 250.0 / real'(t1 - t0));
  endtask

  task automatic iterative_blocks();
    longint t0, t1;
    logic [511:0] b;
    for (int k = 0; k < 4; k++) begin
      b = rand_block();
      @(negedge clk); it_start = 1; it_din = b; t0 = cyc; @(negedge clk); it_start = 0;
      while (!it_ready) @(negedge clk);
      t1 = cyc;
      checks++; if (it_keystream !== hash(b)) begin failures++; $display("FAIL iterative"); end
    end
    expect_eq("iterative cycles/block", t1 - t0, 40);
    $display("iterative Salsa20: %0d cycles/block, 512 bits per %0d cycles", t1 - t0, t1 - t0);
  endtask

  task automatic fast_blocks();
    longint first = -1, last = 0;
    int n = 0;
    logic [511:0] b0;
    b0 = rand_block();
    fork
      begin
        for (int k = 0; k < 50; k++) begin
          @(negedge clk); fs_in_valid = 1; fs_din = (k == 0) ? b0 : rand_block();
        end
        @(negedge clk); fs_in_valid = 0;
      end
      begin
        while (n < 50) begin
          @(negedge clk);
          if (fs_out_valid) begin
            if (first < 0) begin
              first = cyc;
              checks++; if (fs_keystream !== hash(b0)) begin failures++; $display("FAIL fast"); end
            end
            last = cyc; n++;
          end
        end
      end
    join
    expect_eq("pipelined cycles for 50 blocks", last - first + 1, 50);
    $display("pipelined Salsa20: 50 blocks in %0d cycles", last - first + 1);
  endtask

  task automatic fpga_blocks();
    longint t0, t1;
    logic [511:0] e;
    for (int k = 0; k < 2; k++) begin
      fp_key = {$urandom, $urandom, $urandom, $urandom}; fp_nonce = {$urandom, $urandom};
      fp_counter = 64'(k);
      e = hash(matrix(fp_key, fp_nonce, fp_counter));
      @(negedge clk); fp_start = 1; t0 = cyc; @(negedge clk); fp_start = 0;
      while (!fp_ks_valid) @(negedge clk);
      checks++; if (fp_keystream !== e[31:0]) begin failures++; $display("FAIL fpga word"); end
      while (!fp_done) @(negedge clk);
      t1 = cyc;
    end
    expect_eq("FPGA cycles/block", t1 - t0, 1362);
    $display("FPGA Salsa20: %0d cycles/block; 38 Mbit/s needs %0.1f MHz", t1 - t0,
             38.0 * real'(t1 - t0) / 512.0);
  endtask

  task automatic phelix_words();
    w32 pts [$], ks [$];
    longint t [$];
    int got = 0;
    ph_key = {8{$urandom}}; ph_key_len = 6'd32;
    ph_nonce = {$urandom, $urandom, $urandom, $urandom};
    for (int i = 0; i < 16; i++) pts.push_back($urandom);
    phelix_ref_pkg::keystream(ph_key, 32, ph_nonce, pts, ks);
    @(negedge clk); ph_start = 1; @(negedge clk); ph_start = 0;
    while (!ph_ready) @(negedge clk);
    for (int i = 0; got < 16; ) begin
      ph_pt_valid = (i < 16);
      ph_pt = pts[i < 16 ? i : 15];
      if (ph_ks_valid) begin
        checks++; if (ph_keystream !== ks[got]) begin failures++; $display("FAIL phelix word"); end
        t.push_back(cyc); got++;
      end
      if (ph_pt_valid && ph_pt_ready) i++;
      @(negedge clk);
    end
    ph_pt_valid = 0;
    expect_eq("Phelix cycles/word", (t[15] - t[5]) / 10, 26);
    $display("Phelix: %0d cycles/word, %0.1f Mbit/s at a 7 ns clock", (t[15] - t[5]) / 10,
             32.0 * 1000.0 / 7.0 / real'((t[15] - t[5]) / 10));
  endtask

  initial begin
    repeat (3) @(negedge clk); rst = 0;
    fork
      compact_blocks();
      iterative_blocks();
      fast_blocks();
      fpga_blocks();
      phelix_words();
    join
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
