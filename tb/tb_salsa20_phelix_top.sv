// End-to-end testbench of salsa20_phelix_top at its default parameters.
// All five cores run at once on the same clock:
//   compact ASIC Salsa20  : two blocks (known answer and random)
//   iterative Salsa20     : eight blocks
//   pipelined Salsa20     : a burst of 25 back-to-back blocks
//   FPGA Salsa20          : two key/nonce/counter sets
//   Phelix                : two keys, 24 plaintext words with stalls
// Every output word is checked against the reference models. The
// testbench also counts the mechanisms each core relies on and fails if
// one never happened: quarterround runs and half-rate enables (compact),
// transposes (iterative), a full pipeline (fast), microcode loop jumps
// (FPGA), key mixing through the shared H, discarded initialisation blocks,
// FIFO push-with-pop and plaintext stalls (Phelix).
module tb_salsa20_phelix_top;
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
  // mechanism counters
  int n_qr = 0, n_ce = 0, n_transpose = 0, n_full_pipe = 0, n_loop_jump = 0;
  int n_km_h = 0, n_discard = 0, n_fifo_wrap = 0, n_pt_stall = 0;

  salsa20_phelix_top dut (.*);

  always #5 clk = ~clk;

  always @(posedge clk) if (!rst) begin
    if (dut.u_compact.quarter_rd_start) n_qr++;
    if (dut.u_compact.qr_ce && dut.u_compact.u_qr.busy) n_ce++;
    if (dut.u_iterative.active && dut.u_iterative.mux_sel) n_transpose++;
    if (dut.u_fast.vld[1] && dut.u_fast.vld[20]) n_full_pipe++;
    if (dut.u_fpga.u_ctrl.state == 1 && dut.u_fpga.u_ctrl.fetched.loop_end &&
        dut.u_fpga.u_ctrl.loops != 9) n_loop_jump++;
    if (dut.u_phelix.u_kmix.h_start && dut.u_phelix.state == 1) n_km_h++;
    if (dut.u_phelix.fifo_push && dut.u_phelix.discard) n_discard++;
    if (dut.u_phelix.fifo_push && dut.u_phelix.fifo_pop) n_fifo_wrap++;
    if (ph_pt_ready && !ph_pt_valid) n_pt_stall++;
  end

  task automatic check(string what, logic [511:0] got, logic [511:0] exp);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s: %h vs %h", what, got[31:0], exp[31:0]); end
  endtask

  // ---------------- compact ASIC Salsa20 ----------------
  task automatic run_compact(logic [511:0] blk, logic [511:0] exp);
    int w = 0;
    @(negedge clk); cs_start = 1; @(negedge clk); cs_start = 0;
    for (int r = 0; r < 4; r++) begin
      cs_din = blk[128*r +: 128]; cs_din_valid = 1;
      while (!cs_din_ready) @(negedge clk);
      @(negedge clk);
    end
    cs_din_valid = 0;
    while (!cs_done) begin
      if (cs_ks_valid) begin check("compact", 512'(cs_keystream), 512'(exp[32*w +: 32])); w++; end
      @(negedge clk);
    end
    checks++; if (w != 16) begin failures++; $display("FAIL compact words %0d", w); end
  endtask

  // ---------------- iterative ----------------
  task automatic run_iterative(logic [511:0] blk);
    int cyc = 1;
    @(negedge clk); it_start = 1; it_din = blk; @(negedge clk); it_start = 0;
    while (!it_ready) begin @(negedge clk); cyc++; end
    check("iterative", it_keystream, hash(blk));
    checks++; if (cyc != 40) begin failures++; $display("FAIL iterative latency %0d", cyc); end
  endtask

  // ---------------- fast ----------------
  logic [511:0] fs_exp [$];
  always @(negedge clk) if (fs_out_valid) begin
    checks++;
    if (fs_exp.size() == 0 || fs_keystream !== fs_exp[0]) begin failures++; $display("FAIL fast"); end
    if (fs_exp.size() != 0) void'(fs_exp.pop_front());
  end
  task automatic run_fast(int n);
    for (int i = 0; i < n; i++) begin
      logic [511:0] b;
      b = rand_block();
      @(negedge clk); fs_in_valid = 1; fs_din = b; fs_exp.push_back(hash(b));
    end
    @(negedge clk); fs_in_valid = 0;
    repeat (25) @(negedge clk);
    checks++; if (fs_exp.size() != 0) begin failures++; $display("FAIL fast missing outputs"); end
  endtask

  // ---------------- FPGA ----------------
  task automatic run_fpga();
    logic [511:0] exp;
    int w = 0;
    fp_key = {$urandom, $urandom, $urandom, $urandom};
    fp_nonce = {$urandom, $urandom}; fp_counter = {$urandom, $urandom};
    exp = hash(matrix(fp_key, fp_nonce, fp_counter));
    @(negedge clk); fp_start = 1; @(negedge clk); fp_start = 0;
    forever begin
      if (fp_ks_valid) begin check("fpga", 512'(fp_keystream), 512'(exp[32*w +: 32])); w++; end
      if (fp_done) break;
      @(negedge clk);
    end
    checks++; if (w != 16) begin failures++; $display("FAIL fpga words %0d", w); end
  endtask

  // ---------------- Phelix ----------------
  task automatic run_phelix(int nwords);
    w32 pts [$], ks [$];
    int len, got = 0;
    len = $urandom_range(1, 32);
    ph_key = '0;
    for (int b = 0; b < len; b++) ph_key[8*b +: 8] = 8'($urandom);
    ph_key_len = 6'(len);
    ph_nonce = {$urandom, $urandom, $urandom, $urandom};
    for (int i = 0; i < nwords; i++) pts.push_back($urandom);
    phelix_ref_pkg::keystream(ph_key, len, ph_nonce, pts, ks);
    @(negedge clk); ph_start = 1; @(negedge clk); ph_start = 0;
    while (!ph_ready) @(negedge clk);
    for (int i = 0; got < nwords; ) begin
      ph_pt_valid = (i < nwords) && ($urandom_range(0, 2) != 0);
      if (i < nwords) ph_pt = pts[i];
      if (ph_ks_valid) begin
        checks++;
        if (ph_keystream !== ks[got] || ph_ct !== (ks[got] ^ pts[got])) begin
          failures++; $display("FAIL phelix word %0d", got);
        end
        got++;
      end
      if (ph_pt_valid && ph_pt_ready) i++;
      @(negedge clk);
    end
    ph_pt_valid = 0;
  endtask

  initial begin
    repeat (3) @(negedge clk); rst = 0;
    fork
      begin run_compact(kat_in(), KAT_OUT); begin logic [511:0] b; b = rand_block(); run_compact(b, hash(b)); end end
      begin for (int i = 0; i < 8; i++) run_iterative(rand_block()); end
      run_fast(25);
      begin run_fpga(); run_fpga(); end
      begin run_phelix(12); run_phelix(12); end
    join
    checks++; if (n_qr != 160) begin failures++; $display("FAIL quarterround runs %0d", n_qr); end
    checks++; if (n_ce < 4 * 160) begin failures++; $display("FAIL half-rate steps %0d", n_ce); end
    checks++; if (n_transpose != 8 * 20) begin failures++; $display("FAIL transposes %0d", n_transpose); end
    checks++; if (n_full_pipe == 0) begin failures++; $display("FAIL pipeline never full"); end
    checks++; if (n_loop_jump != 2 * 9) begin failures++; $display("FAIL loop jumps %0d", n_loop_jump); end
    checks++; if (n_km_h != 2 * 8) begin failures++; $display("FAIL key-mix H runs %0d", n_km_h); end
    checks++; if (n_discard != 2 * 8) begin failures++; $display("FAIL discarded blocks %0d", n_discard); end
    checks++; if (n_fifo_wrap == 0) begin failures++; $display("FAIL FIFO never wrapped"); end
    checks++; if (n_pt_stall == 0) begin failures++; $display("FAIL no plaintext stall"); end
    $display("mechanisms: qr=%0d ce=%0d transpose=%0d fullpipe=%0d loopjump=%0d kmH=%0d discard=%0d fifowrap=%0d ptstall=%0d",
             n_qr, n_ce, n_transpose, n_full_pipe, n_loop_jump, n_km_h, n_discard, n_fifo_wrap, n_pt_stall);
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
