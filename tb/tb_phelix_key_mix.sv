// Testbench of phelix_key_mix. A behavioural stand-in for the shared
// H_func answers each h_start ten cycles later with the reference H (key
// inputs zero). The working key must match the reference key mixing for
// random keys of random lengths, after exactly eight H requests.
module tb_phelix_key_mix;
  import phelix_ref_pkg::*;

  logic clk = 0, rst = 1, km_start = 0, h_start, h_done = 0, km_done;
  logic [255:0] u = 0, k;
  logic [31:0] lu64 = 0;
  logic [159:0] win, wout = 0;
  int checks = 0, failures = 0, hreq = 0;

  phelix_key_mix dut (.*);

  always #5 clk = ~clk;

  // H stand-in.
  initial forever begin
    @(posedge clk);
    if (h_start) begin
      logic [159:0] r;
      r = pack5(H(unpack5(win), 0, 0));
      hreq++;
      repeat (9) @(posedge clk);
      wout <= r; h_done <= 1;
      @(posedge clk); h_done <= 0;
    end
  end

  initial begin
    repeat (3) @(negedge clk); rst = 0;
    for (int t = 0; t < 20; t++) begin
      int len;
      len = $urandom_range(0, 32);
      u = '0;
      for (int b = 0; b < len; b++) u[8*b +: 8] = 8'($urandom);
      lu64 = 32'(len + 64);
      hreq = 0;
      @(negedge clk); km_start = 1; @(negedge clk); km_start = 0;
      while (!km_done) @(negedge clk);
      checks++; if (k !== key_mix(u, len)) begin failures++; $display("FAIL key len %0d", len); end
      checks++; if (hreq != 8) begin failures++; $display("FAIL %0d H requests", hreq); end
    end
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
