// Sequential Salsa20 quarterround (the compact ASIC's quarterround block).
//
// Four 32-bit registers hold y0..y3. One adder, fed by two 4:1 operand
// multiplexers, a 4:1 multiplexer choosing the rotation (7, 9, 13 or 18 bits)
// and one XOR compute one output word per step, which is written back into
// its register:
//   step 0: r1 ^= (r0 + r3) <<< 7     step 1: r2 ^= (r1 + r0) <<< 9
//   step 2: r3 ^= (r2 + r1) <<< 13    step 3: r0 ^= (r3 + r2) <<< 18
// This structure and the rotation amounts follow the document's datapath
// figure; the step counter and the clock-enable are this design's own.
//
// Interface: a start pulse loads din (y0 in bits 31:0) into the registers in
// parallel. The document runs this block on a clock of half the system
// frequency; here that is a clock enable `ce` from the controller's divider,
// and one step happens in each cycle with ce high. `done` pulses for one
// cycle together with the final dout, four enabled cycles after start.
// Reset clears all registers.
module salsa20_qr_seq
  import salsa20_pkg::*;
(
  input  logic   clk,
  input  logic   rst,
  input  logic   ce,
  input  logic   start,
  input  quad_t  din,
  output quad_t  dout,
  output logic   done
);

  word_t       r [4];
  logic        busy;
  logic [1:0]  step;

  word_t opa, opb, sum, rot, xsrc, res;

  // Operand, rotation and target selection of the current step.
  always_comb begin
    unique case (step)
      2'd0: begin opa = r[0]; opb = r[3]; end
      2'd1: begin opa = r[1]; opb = r[0]; end
      2'd2: begin opa = r[2]; opb = r[1]; end
      default: begin opa = r[3]; opb = r[2]; end
    endcase
    sum = opa + opb;
    unique case (step)
      2'd0: rot = {sum[24:0], sum[31:25]};
      2'd1: rot = {sum[22:0], sum[31:23]};
      2'd2: rot = {sum[18:0], sum[31:19]};
      default: rot = {sum[13:0], sum[31:14]};
    endcase
    xsrc = r[2'(step + 2'd1)];
    res  = xsrc ^ rot;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int i = 0; i < 4; i++) r[i] <= '0;
      busy <= 1'b0;
      step <= '0;
      done <= 1'b0;
    end else begin
      done <= 1'b0;
      if (start) begin
        for (int i = 0; i < 4; i++) r[i] <= din[32*i +: 32];
        busy <= 1'b1;
        step <= '0;
      end else if (busy && ce) begin
        r[2'(step + 2'd1)] <= res;
        step <= step + 2'd1;
        if (step == 2'd3) begin
          busy <= 1'b0;
          done <= 1'b1;
        end
      end
    end
  end

  assign dout = {r[3], r[2], r[1], r[0]};

endmodule
