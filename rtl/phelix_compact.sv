// Compact Phelix keystream generator (one H_func shared by everything).
//
// After start the core
//   1. expands the nonce and mixes the key, key_mix using the H_func with
//      zero key inputs (8 runs of H);
//   2. loads the initial state (K_j+3 XOR N_j, K7) and runs the eight
//      initialisation blocks -8..-1 with zero plaintext, their keystream
//      discarded; ready then rises;
//   3. for each plaintext word accepted (pt_valid && pt_ready) runs one
//      block i = 0, 1, ...: the subkey generator makes X_i,0 and X_i,1;
//      H(state, K0 = 0, K1 = X_i,0) gives Y; the keystream word is
//      Y.w4 + (w4 of the state entering block i-4), the old word taken from
//      the four-entry FIFO; H(Y, K0 = plaintext, K1 = X_i,1) gives the next
//      state. keystream and ct = pt XOR keystream come with ks_valid.
// The block set (n_expand, key_mix, subkey_gen, counter, ini_dp, H_func,
// FIFO, output adder and keystream register) and the K0/K1 multiplexers
// (0 or plaintext; 0, x0 or x1) follow the document's figure. The Phelix
// details the document leaves to the cipher's specification (nonce and key
// expansion, subkeys, initial state, keystream rule) are as described in
// the sub-blocks. The MAC computation at the end of a message is not
// included. key_len is the key length in bytes (0..32); key must be
// zero-padded above it.
//
// Timing: key set-up takes 8*11 cycles plus eight blocks; after that each
// block takes 26 cycles, giving one keystream word per accepted plaintext
// word, 13 cycles after acceptance. start is taken in any state and begins a
// new key and nonce, abandoning any block in progress.
module phelix_compact
  import phelix_pkg::*;
(
  input  logic         clk,
  input  logic         rst,
  input  logic         start,
  input  key_t         key,
  input  logic [5:0]   key_len,
  input  logic [127:0] nonce,
  output logic         ready,
  input  logic         pt_valid,
  input  word_t        pt,
  output logic         pt_ready,
  output logic         ks_valid,
  output word_t        keystream,
  output word_t        ct
);

  typedef enum logic [3:0] {
    S_IDLE, S_KM, S_INIT, S_WAIT_PT, S_SK, S_H1, S_H1_W, S_H2, S_H2_W
  } state_t;

  state_t  state;
  key_t    n, kw;
  pstate_t km_win, dp_win, h_win, h_wout;
  word_t   x0, x1, h_k0, h_k1, fifo_dout, pt_reg, z4_in, s_word;
  logic    km_start, km_h_start, km_done, h_start, h_done, sel_init, discard;
  logic    ctr_clear, ctr_inc, sk_start, fifo_push, fifo_pop;
  logic [63:0] i_blk;
  logic [2:0]  fifo_count;
  word_t   lu64, lu4;

  assign lu64 = 32'(key_len) + 32'd64;
  assign lu4  = 32'(key_len) << 2;

  phelix_n_expand u_nexp (.clk, .rst, .start(km_start), .n_in(nonce), .n);

  phelix_key_mix u_kmix (
    .clk, .rst, .km_start, .u(key), .lu64, .win(km_win), .h_start(km_h_start),
    .wout(h_wout), .h_done, .k(kw), .km_done
  );

  phelix_counter u_ctr (.clk, .clear(ctr_clear), .inc(ctr_inc), .q(i_blk));

  phelix_subkey_gen u_skg (
    .clk, .rst, .start(sk_start), .k(kw), .n, .lu4,
    .ihigh32(i_blk[63:32]), .ilow32(i_blk[31:0]), .x0, .x1
  );

  phelix_ini_dp u_ini (
    .k(kw), .n, .sel_init, .wfb(h_wout), .ihigh32(i_blk[63:32]),
    .win(dp_win), .discard
  );

  // H input and key multiplexers.
  assign h_win   = (state == S_KM) ? km_win : dp_win;
  assign h_k0    = (state == S_H2 || state == S_H2_W) ? pt_reg : '0;
  assign h_k1    = (state == S_H1 || state == S_H1_W) ? x0 :
                   (state == S_H2 || state == S_H2_W) ? x1 : '0;
  assign h_start = (state == S_KM) ? km_h_start : (state == S_H1 || state == S_H2);

  phelix_h_func u_h (
    .clk, .rst, .start(h_start), .win(h_win), .k0(h_k0), .k1(h_k1),
    .wout(h_wout), .done(h_done)
  );

  // Old-state FIFO and output adder.
  phelix_fifo u_fifo (
    .clk, .rst(rst || state == S_INIT), .push(fifo_push), .pop(fifo_pop),
    .din(z4_in), .dout(fifo_dout), .count(fifo_count)
  );

  assign s_word    = h_wout[32*4 +: 32] + fifo_dout;
  assign fifo_push = (state == S_H1_W) && h_done;
  assign fifo_pop  = fifo_push && (fifo_count == 3'(OLD_WORDS));

  assign km_start  = start;
  assign ctr_clear = (state == S_INIT);
  assign ctr_inc   = (state == S_H2_W) && h_done;
  assign sk_start  = (state == S_SK);
  assign pt_ready  = (state == S_WAIT_PT) && !start;

  always_ff @(posedge clk) begin
    if (rst) begin
      state     <= S_IDLE;
      sel_init  <= 1'b0;
      pt_reg    <= '0;
      z4_in     <= '0;
      ready     <= 1'b0;
      ks_valid  <= 1'b0;
      keystream <= '0;
      ct        <= '0;
    end else begin
      ks_valid <= 1'b0;
      if (start) begin
        state <= S_KM;
        ready <= 1'b0;
      end else unique case (state)
        S_IDLE: ;
        S_KM:   if (km_done) state <= S_INIT;
        S_INIT: begin sel_init <= 1'b1; pt_reg <= '0; state <= S_SK; end
        S_WAIT_PT: if (pt_valid) begin pt_reg <= pt; state <= S_SK; end
        S_SK:   state <= S_H1;
        S_H1:   begin z4_in <= h_win[32*4 +: 32]; sel_init <= 1'b0; state <= S_H1_W; end
        S_H1_W: if (h_done) begin
          if (!discard) begin
            ks_valid  <= 1'b1;
            keystream <= s_word;
            ct        <= s_word ^ pt_reg;
          end
          state <= S_H2;
        end
        S_H2:   state <= S_H2_W;
        S_H2_W: if (h_done) begin
          // i_blk still holds the block just finished.
          if (i_blk == 64'hFFFF_FFFF_FFFF_FFFF) ready <= 1'b1;
          if (discard && i_blk != 64'hFFFF_FFFF_FFFF_FFFF) state <= S_SK;
          else state <= S_WAIT_PT;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

endmodule
