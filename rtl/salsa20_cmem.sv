// 16 x 32-bit memory of the compact ASIC Salsa20 (used as Mem0 and Mem1).
//
// Mem0 holds the working matrix and is rewritten after every quarterround;
// Mem1 keeps the original input for the final addition. Both are this
// module: Mem1 simply never receives a group write. The document gives the
// memories' role, size (16 words of 32 bits) and port names (din(127:0),
// dout(127:0), dout_single(31:0), addr(2:0), serial, load_all, start,
// done); the access modes below are this design's reading of those ports.
//
// All accesses are started by `start` and finish one cycle later with a
// one-cycle `done` pulse (a one-cycle registered memory):
//   load_all      : write din into row addr[1:0] (words 4a..4a+3); also
//                   rewinds the serial read pointer to word 0
//   serial        : dout_single <= word[ptr]; ptr++ (output phase)
//   we            : write din into quarterround group addr (0-3 columns,
//                   4-7 rows; element e of din goes to the group's word e)
//   none of these : read group addr to dout
// dout always shows the group selected at the last read.
module salsa20_cmem
  import salsa20_pkg::*;
(
  input  logic       clk,
  input  logic       rst,
  input  logic       start,
  input  logic       load_all,
  input  logic       serial,
  input  logic       we,
  input  logic [2:0] addr,
  input  quad_t      din,
  output quad_t      dout,
  output word_t      dout_single,
  output logic       done
);

  word_t      mem [16];
  logic [3:0] ptr;

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int i = 0; i < 16; i++) mem[i] <= '0;
      ptr         <= '0;
      dout        <= '0;
      dout_single <= '0;
      done        <= 1'b0;
    end else begin
      done <= start;
      if (start) begin
        if (load_all) begin
          for (int e = 0; e < 4; e++) mem[4*addr[1:0] + e] <= din[32*e +: 32];
          ptr <= '0;
        end else if (serial) begin
          dout_single <= mem[ptr];
          ptr <= ptr + 4'd1;
        end else if (we) begin
          for (int unsigned e = 0; e < 4; e++) mem[grp_idx(32'(addr), e)] <= din[32*e +: 32];
        end else begin
          for (int unsigned e = 0; e < 4; e++) dout[32*e +: 32] <= mem[grp_idx(32'(addr), e)];
        end
      end
    end
  end

endmodule
