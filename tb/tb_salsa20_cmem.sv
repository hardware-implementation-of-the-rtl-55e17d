// Testbench of salsa20_cmem (Mem0/Mem1): row loads, reads and writes of
// all eight quarterround groups and serial reads, against a plain array
// model with the column/row index tables of the Salsa20 definition.
module tb_salsa20_cmem;
  logic clk = 0, rst = 1, start = 0, load_all = 0, serial = 0, we = 0, done;
  logic [2:0] addr = 0;
  logic [127:0] din = 0, dout;
  logic [31:0] dout_single;
  logic [31:0] model [16];
  int checks = 0, failures = 0;

  localparam int GRP [8][4] = '{'{0, 4, 8, 12}, '{5, 9, 13, 1}, '{10, 14, 2, 6}, '{15, 3, 7, 11},
                                '{0, 1, 2, 3}, '{5, 6, 7, 4}, '{10, 11, 8, 9}, '{15, 12, 13, 14}};

  salsa20_cmem dut (.clk, .rst, .start, .load_all, .serial, .we, .addr, .din, .dout, .dout_single, .done);

  always #5 clk = ~clk;

  task automatic access(input logic la, input logic se, input logic w, input logic [2:0] a,
                        input logic [127:0] d);
    @(negedge clk); start = 1; load_all = la; serial = se; we = w; addr = a; din = d;
    @(negedge clk); start = 0; load_all = 0; serial = 0; we = 0;
    checks++; if (!done) begin failures++; $display("FAIL done not one cycle after start"); end
  endtask

  task automatic check_groups();
    for (int g = 0; g < 8; g++) begin
      access(0, 0, 0, 3'(g), '0);
      for (int e = 0; e < 4; e++) begin
        checks++;
        if (dout[32*e +: 32] !== model[GRP[g][e]]) begin
          failures++; $display("FAIL group %0d elem %0d: %h vs %h", g, e, dout[32*e +: 32], model[GRP[g][e]]);
        end
      end
    end
  endtask

  initial begin
    repeat (3) @(negedge clk); rst = 0;
    for (int r = 0; r < 4; r++) begin
      logic [127:0] d;
      d = {$urandom, $urandom, $urandom, $urandom};
      for (int e = 0; e < 4; e++) model[4*r+e] = d[32*e +: 32];
      access(1, 0, 0, 3'(r), d);
    end
    check_groups();
    for (int k = 0; k < 16; k++) begin
      int g;
      logic [127:0] d;
      g = $urandom_range(0, 7);
      d = {$urandom, $urandom, $urandom, $urandom};
      for (int e = 0; e < 4; e++) model[GRP[g][e]] = d[32*e +: 32];
      access(0, 0, 1, 3'(g), d);
    end
    check_groups();
    access(1, 0, 0, 3'd0, {model[3], model[2], model[1], model[0]});  // rewinds the pointer
    for (int w = 0; w < 16; w++) begin
      access(0, 1, 0, 3'd0, '0);
      checks++;
      if (dout_single !== model[w]) begin
        failures++; $display("FAIL serial word %0d: %h vs %h", w, dout_single, model[w]);
      end
    end
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
