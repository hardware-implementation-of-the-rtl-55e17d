// Phelix half-block function H(w0..w4, K0, K1), one line per clock.
//
// The ten lines of H each update one word with an addition or an XOR and
// rotate another word by a fixed amount:
//   0: w0 += w3 ^ K0; w3 <<<= 15     5: w0 ^= w3 + K1; w3 <<<= 30
//   1: w1 += w4;      w4 <<<= 25     6: w1 ^= w4;      w4 <<<= 13
//   2: w2 ^= w0;      w0 <<<= 9      7: w2 += w0;      w0 <<<= 20
//   3: w3 ^= w1;      w1 <<<= 10     8: w3 += w1;      w1 <<<= 11
//   4: w4 += w2;      w2 <<<= 17     9: w4 ^= w2;      w2 <<<= 5
// The function is the document's. Doing one line per cycle with one shared
// adder and one shared XOR (function sharing for a small area) is this
// design's reading of the compact structure.
//
// Interface: start loads win (w0 in bits 31:0); k0 and k1 must be held
// stable until done. Lines run in the next ten cycles; done pulses for one
// cycle when wout holds the result, ten cycles after the start edge. wout
// keeps its value until the next start, so it can be fed back as the next
// input.
module phelix_h_func
  import phelix_pkg::*;
#(
  parameter int unsigned STEPS = 10
) (
  input  logic    clk,
  input  logic    rst,
  input  logic    start,
  input  pstate_t win,
  input  word_t   k0,
  input  word_t   k1,
  output pstate_t wout,
  output logic    done
);

  word_t      w [5];
  word_t      n [5];
  logic [3:0] step;
  logic       busy;

  // Shared operators: one adder and one XOR; line 0's key XOR (w3 ^ K0)
  // sits in front of the adder's operand multiplexer, so that the adder and
  // the XOR never form a combinational loop.
  word_t add_a, add_b, add_y, xor_a, xor_b, xor_y;
  assign add_y = add_a + add_b;
  assign xor_y = xor_a ^ xor_b;

  always_comb begin
    for (int i = 0; i < 5; i++) n[i] = w[i];
    add_a = '0; add_b = '0; xor_a = '0; xor_b = '0;
    unique case (step)
      4'd0: begin add_a = w[0]; add_b = w[3] ^ k0;
                  n[0] = add_y; n[3] = rotl(w[3], 15); end
      4'd1: begin add_a = w[1]; add_b = w[4]; n[1] = add_y; n[4] = rotl(w[4], 25); end
      4'd2: begin xor_a = w[2]; xor_b = w[0]; n[2] = xor_y; n[0] = rotl(w[0], 9); end
      4'd3: begin xor_a = w[3]; xor_b = w[1]; n[3] = xor_y; n[1] = rotl(w[1], 10); end
      4'd4: begin add_a = w[4]; add_b = w[2]; n[4] = add_y; n[2] = rotl(w[2], 17); end
      4'd5: begin add_a = w[3]; add_b = k1; xor_a = w[0]; xor_b = add_y;
                  n[0] = xor_y; n[3] = rotl(w[3], 30); end
      4'd6: begin xor_a = w[1]; xor_b = w[4]; n[1] = xor_y; n[4] = rotl(w[4], 13); end
      4'd7: begin add_a = w[2]; add_b = w[0]; n[2] = add_y; n[0] = rotl(w[0], 20); end
      4'd8: begin add_a = w[3]; add_b = w[1]; n[3] = add_y; n[1] = rotl(w[1], 11); end
      4'd9: begin xor_a = w[4]; xor_b = w[2]; n[4] = xor_y; n[2] = rotl(w[2], 5); end
      default: ;
    endcase
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int i = 0; i < 5; i++) w[i] <= '0;
      step <= '0;
      busy <= 1'b0;
      done <= 1'b0;
    end else begin
      done <= 1'b0;
      if (start) begin
        for (int i = 0; i < 5; i++) w[i] <= win[32*i +: 32];
        step <= '0;
        busy <= 1'b1;
      end else if (busy) begin
        for (int i = 0; i < 5; i++) w[i] <= n[i];
        step <= step + 4'd1;
        if (step == 4'(STEPS - 1)) begin
          busy <= 1'b0;
          done <= 1'b1;
        end
      end
    end
  end

  assign wout = {w[4], w[3], w[2], w[1], w[0]};

endmodule
