// Testbench of the compact Phelix core: random keys (various lengths) and
// nonces, a stream of random plaintext words offered with random gaps;
// every keystream and ciphertext word must match the reference model, no
// keystream may appear during the eight initialisation blocks, and a block
// must take 26 cycles from plaintext acceptance to the keystream word's
// successor being accepted when plaintext is always offered.
module tb_phelix_compact;
  import phelix_ref_pkg::*;

  logic clk = 0, rst = 1, start = 0, ready, pt_valid = 0, pt_ready, ks_valid;
  logic [255:0] key = 0;
  logic [5:0] key_len = 0;
  logic [127:0] nonce = 0;
  logic [31:0] pt = 0, keystream, ct;
  int checks = 0, failures = 0;

  phelix_compact dut (.*);

  always #5 clk = ~clk;

  task automatic session(int nwords, bit gaps);
    w32 pts [$], ks [$];
    int got = 0, acc_cyc [$], cyc = 0;
    int len;
    len = $urandom_range(1, 32);
    key = '0;
    for (int b = 0; b < len; b++) key[8*b +: 8] = 8'($urandom);
    key_len = 6'(len);
    nonce = {$urandom, $urandom, $urandom, $urandom};
    for (int i = 0; i < nwords; i++) pts.push_back($urandom);
    phelix_ref_pkg::keystream(key, len, nonce, pts, ks);
    @(negedge clk); start = 1; @(negedge clk); start = 0;
    while (!ready) begin
      checks++; if (ks_valid) begin failures++; $display("FAIL keystream during init"); end
      @(negedge clk);
    end
    for (int i = 0; i < nwords; ) begin
      pt_valid = !gaps || $urandom_range(0, 3) != 0;
      pt = pts[i];
      if (ks_valid) begin
        checks++;
        if (keystream !== ks[got] || ct !== (ks[got] ^ pts[got])) begin
          failures++; $display("FAIL word %0d: %h vs %h", got, keystream, ks[got]);
        end
        got++;
      end
      if (pt_valid && pt_ready) begin acc_cyc.push_back(cyc); i++; end
      @(negedge clk); cyc++;
    end
    pt_valid = 0;
    while (got < nwords && cyc < 100000) begin
      if (ks_valid) begin
        checks++;
        if (keystream !== ks[got] || ct !== (ks[got] ^ pts[got])) begin
          failures++; $display("FAIL word %0d: %h vs %h", got, keystream, ks[got]);
        end
        got++;
      end
      @(negedge clk); cyc++;
    end
    checks++; if (got != nwords) begin failures++; $display("FAIL %0d words", got); end
    if (!gaps) begin
      checks++;
      if (acc_cyc[nwords-1] - acc_cyc[nwords-2] != 26) begin
        failures++; $display("FAIL block period %0d", acc_cyc[nwords-1] - acc_cyc[nwords-2]);
      end
    end
  endtask

  initial begin
    repeat (3) @(negedge clk); rst = 0;
    session(20, 1);
    session(20, 0);
    session(10, 0);
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
