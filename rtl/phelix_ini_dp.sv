// Phelix input selection for H_func (ini_dp).
//
// Forms the initial state of block -8 from working key K and working nonce
// N: w_j = K_(j+3) XOR N_j for j = 0..3 and w4 = K_7 (the XOR of key and
// nonce words drawn in the document's figure; the word assignment is the
// Phelix specification's). sel_init chooses that initial state, otherwise
// the state fed back from H_func is passed on. discard is high while the
// block counter is negative, i.e. during the eight initialisation blocks
// whose keystream the document says is thrown away. Combinational.
module phelix_ini_dp
  import phelix_pkg::*;
(
  input  key_t    k,
  input  key_t    n,
  input  logic    sel_init,
  input  pstate_t wfb,
  input  word_t   ihigh32,
  output pstate_t win,
  output logic    discard
);

  pstate_t init;

  always_comb begin
    for (int j = 0; j < 4; j++) init[32*j +: 32] = k[32*(j+3) +: 32] ^ n[32*j +: 32];
    init[32*4 +: 32] = k[32*7 +: 32];
  end

  assign win     = sel_init ? init : wfb;
  assign discard = ihigh32[31];

endmodule
