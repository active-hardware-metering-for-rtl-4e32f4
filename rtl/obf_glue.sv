// obf_glue: glue logic that keeps the original-STG flip-flops moving while the
// IC is locked.
//
// While the added STG is being traversed the original-STG register is never
// left still: its three code bits step through the dummy states q5*, q6*, q7*
// (codes that are not states of the original FSM) and its two replica bits are
// scrambled, all as a function of the added-STG state and the input. An
// observer of the flip-flops sees every bit toggle and cannot separate added
// and original flip-flops by activity. Six chip-ID bits (salt) are folded in
// too, so two dies given the same inputs from the same added state show
// different dummy patterns. The mixing function is this design's choice.
// Combinational.
module obf_glue #(
  parameter int unsigned N_MOD = 5,
  parameter int unsigned IN_W  = 3
) (
  input  logic [3*N_MOD-1:0] a,
  input  logic [IN_W-1:0]    x,
  input  logic [5:0]         salt,
  output logic [4:0]         code_next
);
  import metering_pkg::*;

  logic [1:0] sel, fa, fb, fx;
  always_comb begin
    // fold the added state (two ways) and the input down to two bits each
    fa = '0;
    fb = '0;
    fx = '0;
    for (int i = 0; i < 3 * N_MOD; i++) begin
      fa[i % 2] ^= a[i];
      fb[(i / 3) % 2] ^= a[i];
    end
    for (int i = 0; i < IN_W; i++) fx[i % 2] ^= x[i];
    fa ^= salt[1:0] ^ salt[5:4];
    fb ^= salt[3:2];
    sel = fa ^ fx;
    unique case (sel)
      2'd0, 2'd3: code_next[2:0] = D5;
      2'd1:       code_next[2:0] = D6;
      default:    code_next[2:0] = D7;
    endcase
    code_next[4:3] = fb ^ fx ^ {fx[0], fa[1]};
  end
endmodule
