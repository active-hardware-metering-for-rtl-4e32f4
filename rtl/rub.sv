// rub: behavioural model of the Random Unique Block, K random-ID cells.
//
// Every cell is a rub_cell with the same die SEED and its own index, so two
// dies with different seeds show unrelated IDs and a few bits of each die are
// unstable. `id` is valid after the falling edge of `eval` and holds until the
// next evaluation. The cells are individual instances, not an array macro,
// so they can be placed among the logic rather than as a visible memory.
module rub #(
  parameter int unsigned K    = 26,
  parameter int unsigned SEED = 1
) (
  input  logic         eval,
  output logic [K-1:0] id
);
  for (genvar i = 0; i < K; i++) begin : g_cell
    rub_cell #(.SEED(SEED), .INDEX(i)) u_cell (.eval(eval), .id_bit(id[i]));
  end
endmodule
