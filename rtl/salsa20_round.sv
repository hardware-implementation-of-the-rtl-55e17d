// One Salsa20 column round: four quarterround units working in parallel on
// the four columns of the 16-word matrix (purely combinational). Row rounds
// are obtained by transposing the matrix around this unit, which is what
// the iterative and pipelined designs do.
module salsa20_round
  import salsa20_pkg::*;
(
  input  block_t x,
  output block_t y
);

  for (genvar c = 0; c < 4; c++) begin : g_col
    quad_t q, z;
    for (genvar e = 0; e < 4; e++) begin : g_in
      assign q[32*e +: 32] = x[32*col_idx(c, e) +: 32];
      assign y[32*col_idx(c, e) +: 32] = z[32*e +: 32];
    end
    assign z = quarterround(q);
  end

endmodule
