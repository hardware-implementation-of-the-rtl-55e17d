// Phelix key mixing: variable-length key U to the 256-bit working key.
//
// U (at most 32 bytes, zero-padded, little-endian words) gives the words
// K32..K39. Going downwards, for k = 7..0,
//   (K_4k .. K_4k+3) = H'(K_4k+4 .. K_4k+7, len(U)+64)[w0..w3] XOR (K_4k+8 .. K_4k+11)
// where H' is H with both key inputs zero; K0..K7 is the working key. This
// recursion is the Phelix specification's. The document draws key_mix
// sharing the one H_func of the core (ports win, wout, km_start, h_done,
// lu64), which is done here: the block keeps an eight-word window
// (lo = K_4k+4.., hi = K_4k+8..), issues h_start with win = {lu64, lo}, and
// when h_done comes replaces the window by (new, lo).
//
// Timing: km_start loads the window; eight H runs of 11 cycles each follow
// (h_start, ten lines); km_done pulses for one cycle with k valid, and k
// holds until the next km_start. The caller must hold H's key inputs at 0.
module phelix_key_mix
  import phelix_pkg::*;
(
  input  logic    clk,
  input  logic    rst,
  input  logic    km_start,
  input  key_t    u,
  input  word_t   lu64,
  output pstate_t win,
  output logic    h_start,
  input  pstate_t wout,
  input  logic    h_done,
  output key_t    k,
  output logic    km_done
);

  typedef enum logic [1:0] {S_IDLE, S_H, S_WAIT} state_t;

  state_t       state;
  logic [127:0] lo, hi;
  logic [2:0]   iter;

  assign win     = {lu64, lo};
  assign h_start = (state == S_H);
  assign k       = {hi, lo};

  always_ff @(posedge clk) begin
    if (rst) begin
      state   <= S_IDLE;
      lo      <= '0;
      hi      <= '0;
      iter    <= '0;
      km_done <= 1'b0;
    end else begin
      km_done <= 1'b0;
      unique case (state)
        S_IDLE: if (km_start) begin
          lo    <= u[127:0];
          hi    <= u[255:128];
          iter  <= '0;
          state <= S_H;
        end
        S_H: state <= S_WAIT;
        S_WAIT: if (h_done) begin
          lo   <= wout[127:0] ^ hi;
          hi   <= lo;
          iter <= iter + 3'd1;
          if (iter == 3'd7) begin
            state   <= S_IDLE;
            km_done <= 1'b1;
          end else begin
            state <= S_H;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

endmodule
