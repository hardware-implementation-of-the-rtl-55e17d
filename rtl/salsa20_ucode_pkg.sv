// Microinstruction format and microprogram of the compact FPGA Salsa20.
//
// Each microinstruction drives the datapath of salsa20_fpga for one clock:
//   src      input multiplexer of the RAMs: 0 constant ROM, 1 key/IV word,
//            2 result register (quarterround feedback)
//   idx      which constant (0-3) or key/IV word (0-7) src selects
//   a0, a1   addresses of RAM0 and RAM1 (32 words each: 0-15 working
//            matrix, 16-31 original input matrix)
//   we0, we1 write enables of the two RAMs
//   ld_a/ld_b load the adder's operand registers from RAM0 / RAM1
//   ld_res   load result register with ((a + b) <<< r) ^ RAM1 output, r = 7, 9, 13, 18 for rsel 0-3
//   ld_ks    load the keystream register with a + b
//   loop_end last microinstruction of the double-round loop body
//   halt     end of program
// The program (ucode) has four parts:
//   0-31    load: each matrix word w is written to RAM0[w] and RAM1[w],
//           then to RAM1[16+w]
//   32-159  one double round (loop body, run 10 times): 8 quarterrounds
//           (4 columns, 4 rows) of 4 steps; a step z_b = y_b ^ ((y_a+y_c)<<<r)
//           takes 4 cycles: read y_a,y_c; load registers and read y_b;
//           compute into the result register; write z_b to both RAMs
//   160-207 output: for each word w, read RAM0[w] and RAM1[16+w], load the
//           operand registers, add into the keystream register
//   208     halt
// The document says the controller is microprogrammed and its control
// words sit in a memory; the format and program are this design's own.
package salsa20_ucode_pkg;

  import salsa20_pkg::*;

  typedef struct packed {
    logic [1:0] src;
    logic [2:0] idx;
    logic [4:0] a0;
    logic [4:0] a1;
    logic       we0;
    logic       we1;
    logic       ld_a;
    logic       ld_b;
    logic       ld_res;
    logic [1:0] rsel;
    logic       ld_ks;
    logic       loop_end;
    logic       halt;
  } uinst_t;

  localparam int unsigned UPC_BITS   = 8;
  localparam int unsigned LOAD_START = 0;
  localparam int unsigned LOOP_START = 32;
  localparam int unsigned OUT_START  = 160;
  localparam int unsigned HALT_PC    = 208;
  localparam int unsigned LOOPS      = ROUNDS / 2;

  localparam logic [1:0] SRC_ROM = 2'd0, SRC_KEYIV = 2'd1, SRC_RES = 2'd2;

  // Source of input-matrix word w: a constant or a key/nonce/counter word.
  function automatic void word_source(input int unsigned w, output logic [1:0] src,
                                      output logic [2:0] idx);
    src = SRC_KEYIV;
    unique case (w)
      0: begin src = SRC_ROM; idx = 3'd0; end
      5: begin src = SRC_ROM; idx = 3'd1; end
      10: begin src = SRC_ROM; idx = 3'd2; end
      15: begin src = SRC_ROM; idx = 3'd3; end
      1, 2, 3, 4: idx = 3'(w - 1);        // key words 0-3
      11, 12, 13, 14: idx = 3'(w - 11);   // key words 0-3 again
      default: idx = 3'(w - 2);           // 6,7 nonce -> 4,5; 8,9 counter -> 6,7
    endcase
  endfunction

  function automatic uinst_t ucode(input int unsigned pc);
    uinst_t u;
    u = '0;
    if (pc < LOOP_START) begin
      int unsigned w;
      w = pc / 2;
      word_source(w, u.src, u.idx);
      u.we1 = 1'b1;
      if (pc % 2 == 0) begin
        u.a0 = 5'(w); u.a1 = 5'(w); u.we0 = 1'b1;
      end else begin
        u.a1 = 5'(16 + w);
      end
    end else if (pc < OUT_START) begin
      int unsigned k, g, s, c, ea, ec, eb;
      k  = pc - LOOP_START;
      g  = k / 16;          // group: 0-3 columns, 4-7 rows
      s  = (k / 4) % 4;     // step of the quarterround
      c  = k % 4;           // cycle of the step
      ea = s;               // y_a: y0, z1, z2, z3
      ec = (s + 3) % 4;     // y_c: y3, y0, z1, z2
      eb = (s + 1) % 4;     // target: y1, y2, y3, y0
      unique case (c)
        0: begin u.a0 = 5'(grp_idx(g, ea)); u.a1 = 5'(grp_idx(g, ec)); end
        1: begin u.ld_a = 1'b1; u.ld_b = 1'b1; u.a1 = 5'(grp_idx(g, eb)); end
        2: begin u.ld_res = 1'b1; u.rsel = 2'(s); end
        default: begin
          u.src = SRC_RES; u.a0 = 5'(grp_idx(g, eb)); u.a1 = 5'(grp_idx(g, eb));
          u.we0 = 1'b1; u.we1 = 1'b1;
        end
      endcase
      u.loop_end = (k == 127);
    end else if (pc < HALT_PC) begin
      int unsigned k, w;
      k = pc - OUT_START;
      w = k / 3;
      unique case (k % 3)
        0: begin u.a0 = 5'(w); u.a1 = 5'(16 + w); end
        1: begin u.ld_a = 1'b1; u.ld_b = 1'b1; end
        default: u.ld_ks = 1'b1;
      endcase
    end else begin
      u.halt = 1'b1;
    end
    return u;
  endfunction

endpackage
