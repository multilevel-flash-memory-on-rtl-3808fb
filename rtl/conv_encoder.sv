// conv_encoder: one step of the rate-2/3, memory-3 (8-state) convolutional
// encoder of the TCM code. Purely combinational: the caller holds or chains
// the state. Two input bits x = {x2, x1} give three coded bits z = {z2,z1,z0}
// and the next state.
//
// State st = {x2[t-2], x2[t-1], x1[t-1]}:  z0 = st[1],  z1 = x1^st[0],
// z2 = x2^st[0]^st[2];  next = {st[1], x2, x1}. The code is not
// catastrophic and, with the subset labelling of tcm_modulator, has squared
// free distance 4, equal to the distance inside a subset.
// A feed-forward structure is used so that zero inputs drive the state to 0:
// one zero on x1 and two on x2 terminate the code, matching the three zero
// termination bits of the word format. The generator equations themselves
// are this design's choice.
module conv_encoder
  import tcm_pkg::*;
(
  input  logic [2:0] state_i,
  input  logic [1:0] x_i,       // {x2, x1}
  output logic [2:0] z_o,       // {z2, z1, z0}
  output logic [2:0] state_o
);
  always_comb begin
    z_o     = {x_i[1] ^ state_i[0] ^ state_i[2], x_i[0] ^ state_i[0], state_i[1]};
    state_o = {state_i[1], x_i[1], x_i[0]};
  end
endmodule
