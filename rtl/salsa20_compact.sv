// Compact ASIC Salsa20 core.
//
// One quarterround block does all 80 quarterrounds of a 512-bit block,
// reading and writing four words of a 16-word working memory (Mem0) per
// quarterround. A second memory (Mem1) keeps the original input, and at the
// end one 32-bit adder adds the two memories word by word to give the
// keystream, one word per ks_valid pulse, word 0 first. The block structure
// (Mem0, Mem1, controller, quarterround, 128-bit 2:1 input mux, output adder)
// follows the document; the access protocol is this design's own.
//
// Usage: pulse start, then present the 16-word input matrix as four
// 128-bit rows on din (row 0 first, word 4r in bits 31:0) with din_valid;
// each row is taken in a cycle where din_ready is high. 16 keystream words
// follow after about 1.2k cycles; done pulses after the last one.
module salsa20_compact
  import salsa20_pkg::*;
(
  input  logic  clk,
  input  logic  rst,
  input  logic  start,
  input  quad_t din,
  input  logic  din_valid,
  output logic  din_ready,
  output logic  ks_valid,
  output word_t keystream,
  output logic  done
);

  logic       m0_start, m1_start, serial, load_all, we, mux;
  logic       quarter_rd_start, quarter_done, qr_ce, m0_done, m1_done;
  logic [2:0] addr;
  quad_t      m0_din, m0_dout, m1_dout, qr_dout;
  word_t      m0_single, m1_single;

  salsa20_compact_ctrl u_ctrl (
    .clk, .rst, .start, .din_valid, .din_ready,
    .mem_done(m0_done), .quarter_done,
    .m0_start, .m1_start, .addr, .serial, .load_all, .we, .mux,
    .quarter_rd_start, .qr_ce, .ks_valid, .done
  );

  // MUX2TO1 (128-bit): external row or quarterround result into Mem0.
  assign m0_din = mux ? qr_dout : din;

  salsa20_cmem u_mem0 (
    .clk, .rst, .start(m0_start), .load_all, .serial, .we, .addr,
    .din(m0_din), .dout(m0_dout), .dout_single(m0_single), .done(m0_done)
  );

  salsa20_cmem u_mem1 (
    .clk, .rst, .start(m1_start), .load_all, .serial, .we(1'b0), .addr,
    .din, .dout(m1_dout), .dout_single(m1_single), .done(m1_done)
  );

  salsa20_qr_seq u_qr (
    .clk, .rst, .ce(qr_ce), .start(quarter_rd_start), .din(m0_dout),
    .dout(qr_dout), .done(quarter_done)
  );

  assign keystream = m0_single + m1_single;

endmodule
