// Compact FPGA Salsa20 core.
//
// A small datapath that shares one 32-bit adder among everything: two
// 32-word x 32-bit RAMs (block RAMs with a registered read), a 4:1 input
// multiplexer fed by a constant ROM ("expand 16-byte k"), the key/IV words
// and the result register, two operand registers in front of the adder, a
// 4:1 multiplexer choosing the rotation (7, 9, 13, 18), an XOR with RAM1's
// output, a result register, and a keystream register on the adder output.
// Both RAMs hold the working matrix at addresses 0-15 so that two words can
// be read per cycle; RAM1 also keeps the original matrix at 16-31 for the
// final addition. Every control signal comes from the microprogrammed
// controller (salsa20_ucode_ctrl). The components follow the document's
// figure; the RAM depth, address map and register placement are this
// design's own.
//
// Usage: hold key (128 bits), nonce and counter (64 bits each, low word in
// bits 31:0) and pulse start. 16 keystream words follow, one per ks_valid
// pulse, three cycles apart, word 0 first; done pulses together with the
// last one, 1362 cycles after the start edge (counted as cycle 1).
module salsa20_fpga
  import salsa20_pkg::*;
  import salsa20_ucode_pkg::*;
(
  input  logic         clk,
  input  logic         rst,
  input  logic         start,
  input  logic [127:0] key,
  input  logic [63:0]  nonce,
  input  logic [63:0]  counter,
  output logic         ks_valid,
  output word_t        keystream,
  output logic         done
);

  uinst_t u;
  logic   busy;

  salsa20_ucode_ctrl u_ctrl (.clk, .rst, .start, .uinst(u), .busy, .done);

  // Key & IV words 0-3 key, 4-5 nonce, 6-7 counter.
  logic [255:0] keyiv;
  assign keyiv = {counter, nonce, key};

  word_t rom_word, keyiv_word, wdata, rd0, rd1, reg_a, reg_b, sum, rot, res;
  word_t ram0 [32];
  word_t ram1 [32];

  assign rom_word   = TAU[u.idx[1:0]];
  assign keyiv_word = keyiv[32*u.idx +: 32];

  always_comb begin
    unique case (u.src)
      SRC_ROM:   wdata = rom_word;
      SRC_KEYIV: wdata = keyiv_word;
      SRC_RES:   wdata = res;
      default:   wdata = '0;
    endcase
  end

  // Two single-port RAMs, read-first, registered output.
  always_ff @(posedge clk) begin
    if (u.we0) ram0[u.a0] <= wdata;
    rd0 <= ram0[u.a0];
  end
  always_ff @(posedge clk) begin
    if (u.we1) ram1[u.a1] <= wdata;
    rd1 <= ram1[u.a1];
  end

  assign sum = reg_a + reg_b;

  always_comb begin
    unique case (u.rsel)
      2'd0: rot = {sum[24:0], sum[31:25]};
      2'd1: rot = {sum[22:0], sum[31:23]};
      2'd2: rot = {sum[18:0], sum[31:19]};
      default: rot = {sum[13:0], sum[31:14]};
    endcase
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      reg_a     <= '0;
      reg_b     <= '0;
      res       <= '0;
      keystream <= '0;
      ks_valid  <= 1'b0;
    end else begin
      if (u.ld_a) reg_a <= rd0;
      if (u.ld_b) reg_b <= rd1;
      if (u.ld_res) res <= rot ^ rd1;
      if (u.ld_ks) keystream <= sum;
      ks_valid <= u.ld_ks;
    end
  end

endmodule
