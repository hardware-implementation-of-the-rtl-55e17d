// Testbench of salsa20_qr_seq: known quarterround vectors from the Salsa20
// definition and random inputs against the reference model, with the
// half-rate clock enable toggling; checks that done comes after exactly
// four enabled cycles.
module tb_salsa20_qr_seq;
  import salsa20_ref_pkg::*;

  logic clk = 0, rst = 1, ce = 0, start = 0, done;
  logic [127:0] din, dout;
  int checks = 0, failures = 0;

  salsa20_qr_seq dut (.clk, .rst, .ce, .start, .din, .dout, .done);

  always #5 clk = ~clk;
  always @(posedge clk) ce <= ~ce;

  task automatic run(input logic [127:0] y, input logic [127:0] exp);
    int ces;
    @(negedge clk); din = y; start = 1;
    @(negedge clk); start = 0;
    ces = 0;
    while (!done) begin
      if (ce) ces++;
      @(negedge clk);
    end
    checks++;
    if (dout !== exp) begin
      failures++; $display("FAIL qr(%h) = %h, expected %h", y, dout, exp);
    end
    checks++;
    if (ces != 4) begin failures++; $display("FAIL %0d enabled cycles, expected 4", ces); end
  endtask

  initial begin
    repeat (3) @(negedge clk); rst = 0;
    run({32'h0, 32'h0, 32'h0, 32'h1}, {32'h20500000, 32'h00010200, 32'h00000080, 32'h08008145});
    run({32'h0, 32'h0, 32'h1, 32'h0}, {32'h00402000, 32'h00000200, 32'h00000001, 32'h88000100});
    for (int i = 0; i < 200; i++) begin
      logic [127:0] y;
      y = {$urandom, $urandom, $urandom, $urandom};
      run(y, quarter(y));
    end
    // Reset clears the registers.
    @(negedge clk); rst = 1; @(negedge clk); rst = 0;
    checks++; if (dout !== '0) begin failures++; $display("FAIL reset"); end
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
