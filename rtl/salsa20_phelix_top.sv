// Salsa20 and Phelix stream-cipher cores, side by side.
//
// The five cores are independent designs that share nothing but the clock
// and reset; each keeps its own ports, prefixed by the core's name:
//   cs_*  compact ASIC Salsa20 (one sequential quarterround, two memories)
//   it_*  basic iterative ASIC Salsa20 (four quarterrounds, 40 cycles)
//   fs_*  fast pipelined ASIC Salsa20 (20 round stages, one block/clock)
//   fp_*  compact FPGA Salsa20 (block RAMs, microprogrammed controller)
//   ph_*  compact ASIC Phelix (one shared H function)
// See each core for its protocol and timing.
module salsa20_phelix_top
  import salsa20_pkg::*;
  import phelix_pkg::*;
(
  input  logic          clk,
  input  logic          rst,
  // compact ASIC Salsa20
  input  logic          cs_start,
  input  quad_t         cs_din,
  input  logic          cs_din_valid,
  output logic          cs_din_ready,
  output logic          cs_ks_valid,
  output salsa20_pkg::word_t cs_keystream,
  output logic          cs_done,
  // iterative ASIC Salsa20
  input  logic          it_start,
  input  block_t        it_din,
  output logic          it_ready,
  output block_t        it_keystream,
  // pipelined ASIC Salsa20
  input  logic          fs_in_valid,
  input  block_t        fs_din,
  output logic          fs_out_valid,
  output block_t        fs_keystream,
  // compact FPGA Salsa20
  input  logic          fp_start,
  input  logic [127:0]  fp_key,
  input  logic [63:0]   fp_nonce,
  input  logic [63:0]   fp_counter,
  output logic          fp_ks_valid,
  output salsa20_pkg::word_t fp_keystream,
  output logic          fp_done,
  // compact ASIC Phelix
  input  logic          ph_start,
  input  key_t          ph_key,
  input  logic [5:0]    ph_key_len,
  input  logic [127:0]  ph_nonce,
  output logic          ph_ready,
  input  logic          ph_pt_valid,
  input  phelix_pkg::word_t ph_pt,
  output logic          ph_pt_ready,
  output logic          ph_ks_valid,
  output phelix_pkg::word_t ph_keystream,
  output phelix_pkg::word_t ph_ct
);

  salsa20_compact u_compact (
    .clk, .rst, .start(cs_start), .din(cs_din), .din_valid(cs_din_valid),
    .din_ready(cs_din_ready), .ks_valid(cs_ks_valid), .keystream(cs_keystream), .done(cs_done)
  );

  salsa20_iterative u_iterative (
    .clk, .rst, .start(it_start), .din(it_din), .ready(it_ready), .keystream(it_keystream)
  );

  salsa20_fast u_fast (
    .clk, .rst, .in_valid(fs_in_valid), .din(fs_din), .out_valid(fs_out_valid),
    .keystream(fs_keystream)
  );

  salsa20_fpga u_fpga (
    .clk, .rst, .start(fp_start), .key(fp_key), .nonce(fp_nonce), .counter(fp_counter),
    .ks_valid(fp_ks_valid), .keystream(fp_keystream), .done(fp_done)
  );

  phelix_compact u_phelix (
    .clk, .rst, .start(ph_start), .key(ph_key), .key_len(ph_key_len), .nonce(ph_nonce),
    .ready(ph_ready), .pt_valid(ph_pt_valid), .pt(ph_pt), .pt_ready(ph_pt_ready),
    .ks_valid(ph_ks_valid), .keystream(ph_keystream), .ct(ph_ct)
  );

endmodule
