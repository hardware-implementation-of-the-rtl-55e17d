// Pipelined (fast) ASIC Salsa20 core.
//
// Blocks are independent, so the rounds are unrolled into a pipeline: each
// stage is the iterative design's datapath laid out flat (one column round
// followed by a transpose, which makes the next stage's column round a row
// round), with a register after it. The default of 20 stages, one round per
// stage, is the document's full pipeline; a smaller STAGES (a divisor of
// 20) puts 20/STAGES rounds into each stage, which is this design's reading
// of "a pipelined structure of variable stages". The input matrix travels
// down the pipeline next to the working matrix for the final feed-forward
// addition, done in one more registered stage.
//
// Timing: one block per clock. A block presented with in_valid at edge t
// leaves with out_valid at edge t+STAGES+1 (latency STAGES+1 cycles).
module salsa20_fast
  import salsa20_pkg::*;
#(
  parameter int unsigned STAGES = 20
) (
  input  logic   clk,
  input  logic   rst,
  input  logic   in_valid,
  input  block_t din,
  output logic   out_valid,
  output block_t keystream
);

  localparam int unsigned RPS = ROUNDS / STAGES;  // rounds per stage

  block_t st   [STAGES+1];
  block_t orig [STAGES+1];
  logic   vld  [STAGES+1];

  assign st[0]   = din;
  assign orig[0] = din;
  assign vld[0]  = in_valid;

  for (genvar s = 0; s < STAGES; s++) begin : g_stage
    block_t t [RPS+1];
    assign t[0] = st[s];
    for (genvar r = 0; r < RPS; r++) begin : g_rnd
      block_t cr;
      salsa20_round u_round (.x(t[r]), .y(cr));
      assign t[r+1] = transpose(cr);
    end
    always_ff @(posedge clk) begin
      if (rst) begin
        vld[s+1]  <= 1'b0;
        st[s+1]   <= '0;
        orig[s+1] <= '0;
      end else begin
        vld[s+1]  <= vld[s];
        st[s+1]   <= t[RPS];
        orig[s+1] <= orig[s];
      end
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      out_valid <= 1'b0;
      keystream <= '0;
    end else begin
      out_valid <= vld[STAGES];
      keystream <= block_add(st[STAGES], orig[STAGES]);
    end
  end

  initial assert (ROUNDS % STAGES == 0) else $error("STAGES must divide 20");

endmodule
