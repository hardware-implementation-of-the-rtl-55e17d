// Testbench of phelix_ini_dp: the initial state (K3^N0, K4^N1, K5^N2,
// K6^N3, K7), the feedback path and the discard flag for negative block
// numbers.
module tb_phelix_ini_dp;
  logic [255:0] k, n;
  logic sel_init, discard;
  logic [159:0] wfb, win, exp;
  logic [31:0] ihigh32;
  int checks = 0, failures = 0;

  phelix_ini_dp dut (.*);

  initial begin
    for (int t = 0; t < 200; t++) begin
      for (int j = 0; j < 8; j++) begin k[32*j +: 32] = $urandom; n[32*j +: 32] = $urandom; end
      wfb = {$urandom, $urandom, $urandom, $urandom, $urandom};
      sel_init = t[0];
      ihigh32 = (t % 4 < 2) ? 32'hffffffff : $urandom_range(0, 1000);
      if (sel_init)
        exp = {k[255:224], k[223:192] ^ n[127:96], k[191:160] ^ n[95:64], k[159:128] ^ n[63:32], k[127:96] ^ n[31:0]};
      else
        exp = wfb;
      #1;
      checks++; if (win !== exp) begin failures++; $display("FAIL win sel=%0d", sel_init); end
      checks++; if (discard !== (t % 4 < 2)) begin failures++; $display("FAIL discard"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
