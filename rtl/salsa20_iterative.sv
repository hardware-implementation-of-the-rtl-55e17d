// Basic iterative ASIC Salsa20 core.
//
// The datapath is four quarterround units in parallel (one column round,
// see salsa20_round) and a transpose. After start, odd cycles apply the
// column round and even cycles transpose the matrix, so the next odd cycle
// processes the rows: 20 rounds take 40 cycles, and after an even number of
// transposes the matrix is back in its original orientation. The control
// unit is a cycle counter and a comparator against 40; the comparator's
// equal output loads the keystream register with the final matrix plus the
// input (feed-forward adder) and raises ready. All of this follows the
// document.
//
// Timing: start is taken together with din (16 words, word 0 in bits
// 31:0), and the first column round already happens in that cycle. The
// keystream register is loaded at the 40th clock edge counting the start
// edge as the first, and ready is high from then until the next start. A
// start while busy restarts the block.
module salsa20_iterative
  import salsa20_pkg::*;
#(
  parameter int unsigned CYCLES = 2 * ROUNDS
) (
  input  logic   clk,
  input  logic   rst,
  input  logic   start,
  input  block_t din,
  output logic   ready,
  output block_t keystream
);

  block_t     state, orig, x_in, cr, nxt;
  logic [6:0] cnt;
  logic       active, mux_sel, equal;

  // The first column round is applied in the start cycle itself.
  assign x_in = start ? din : state;
  salsa20_round u_round (.x(x_in), .y(cr));

  // Mux_sel: quarterrounds on odd cycles (cnt even before the increment).
  assign mux_sel = cnt[0];
  assign nxt     = mux_sel ? transpose(state) : cr;
  // Comparator: this cycle completes the last of CYCLES steps.
  assign equal   = active && (cnt == 7'(CYCLES - 1));

  always_ff @(posedge clk) begin
    if (rst) begin
      state     <= '0;
      orig      <= '0;
      cnt       <= '0;
      active    <= 1'b0;
      ready     <= 1'b0;
      keystream <= '0;
    end else if (start) begin
      state  <= cr;
      orig   <= din;
      cnt    <= 7'd1;
      active <= 1'b1;
      ready  <= 1'b0;
    end else if (active) begin
      state <= nxt;
      cnt   <= cnt + 7'd1;
      if (equal) begin
        active    <= 1'b0;
        ready     <= 1'b1;
        keystream <= block_add(nxt, orig);
      end
    end
  end

endmodule
