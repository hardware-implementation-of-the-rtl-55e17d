// Controller of the compact ASIC Salsa20.
//
// Runs one 512-bit block in three phases:
//   load   : accepts four 128-bit rows (din_valid/din_ready) and writes each
//            into Mem0 and Mem1 (load_all, addr = row).
//   rounds : 80 quarterround operations (20 rounds of four). Each one reads
//            a group from Mem0, starts the quarterround block on it, waits
//            for quarter_done and writes the result back (we, mux = 1).
//            Even rounds use column groups 0-3, odd rounds row groups 4-7.
//   output : 16 serial reads of Mem0 and Mem1; ks_valid marks the cycle in
//            which both single-word outputs hold word w, for the adder.
// It also divides the clock by two for the quarterround block, as the
// document does because that block is more than twice as fast as the
// memory; here the divider is a toggling clock enable `qr_ce`. The phase
// order follows the document; the handshake, state encoding and timing
// are this design's own. One block takes 4 + 80*(2+1+8..9+2) + 16*2 + 1
// cycles, about 1.2k cycles.
module salsa20_compact_ctrl
  import salsa20_pkg::*;
(
  input  logic       clk,
  input  logic       rst,
  input  logic       start,
  input  logic       din_valid,
  output logic       din_ready,
  input  logic       mem_done,
  input  logic       quarter_done,
  output logic       m0_start,
  output logic       m1_start,
  output logic [2:0] addr,
  output logic       serial,
  output logic       load_all,
  output logic       we,
  output logic       mux,
  output logic       quarter_rd_start,
  output logic       qr_ce,
  output logic       ks_valid,
  output logic       done
);

  typedef enum logic [3:0] {
    S_IDLE, S_LOAD, S_RD, S_RD_W, S_QR, S_QR_W, S_WR, S_WR_W, S_OUT, S_OUT_W, S_DONE
  } state_t;

  state_t     state;
  logic [6:0] op;     // quarterround operation 0..79
  logic [3:0] cnt;    // row during load, word during output

  // Round r = op/4 is a column round when even, a row round when odd.
  logic [2:0] grp;
  assign grp = {op[2], op[1:0]};

  always_ff @(posedge clk) begin
    if (rst) begin
      state <= S_IDLE;
      op    <= '0;
      cnt   <= '0;
      qr_ce <= 1'b0;
    end else begin
      qr_ce <= ~qr_ce;
      unique case (state)
        S_IDLE:  if (start) begin state <= S_LOAD; cnt <= '0; op <= '0; end
        S_LOAD:  if (din_valid) begin
                   cnt <= cnt + 4'd1;
                   if (cnt == 4'd3) state <= S_RD;
                 end
        S_RD:    state <= S_RD_W;
        S_RD_W:  if (mem_done) state <= S_QR;
        S_QR:    state <= S_QR_W;
        S_QR_W:  if (quarter_done) state <= S_WR;
        S_WR:    state <= S_WR_W;
        S_WR_W:  if (mem_done) begin
                   op <= op + 7'd1;
                   if (op == 7'(4 * ROUNDS - 1)) begin state <= S_OUT; cnt <= '0; end
                   else state <= S_RD;
                 end
        S_OUT:   state <= S_OUT_W;
        S_OUT_W: if (mem_done) begin
                   cnt <= cnt + 4'd1;
                   state <= (cnt == 4'd15) ? S_DONE : S_OUT;
                 end
        S_DONE:  state <= S_IDLE;
        default: state <= S_IDLE;
      endcase
    end
  end

  always_comb begin
    din_ready        = (state == S_LOAD);
    load_all         = (state == S_LOAD);
    serial           = (state == S_OUT);
    we               = (state == S_WR);
    mux              = (state == S_WR);
    m0_start         = (state == S_LOAD && din_valid) || state == S_RD || state == S_WR || state == S_OUT;
    m1_start         = (state == S_LOAD && din_valid) || state == S_OUT;
    addr             = (state == S_LOAD) ? {1'b0, cnt[1:0]} : grp;
    quarter_rd_start = (state == S_QR);
    ks_valid         = (state == S_OUT_W) && mem_done;
    done             = (state == S_DONE);
  end

endmodule
