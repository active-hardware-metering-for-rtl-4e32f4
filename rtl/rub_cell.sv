// rub_cell: behavioural model of one random-ID bit (not synthesizable as a
// real cell: the bit comes from transistor threshold mismatch).
//
// The physical cell is a pair of cross-coupled NOR gates. While `eval` is high
// both latch sides are pulled low; on the falling edge the positive feedback
// amplifies the threshold mismatch and the latch settles to 0 or 1. The model
// derives a fixed mismatch from a hash of SEED (the die) and INDEX (the bit);
// cells whose mismatch is among the smallest UNSTABLE_PCT percent settle
// pseudo-randomly at every evaluation, matching a reported stability of 96 %.
// Output changes only on the falling edge of eval.
module rub_cell #(
  parameter int unsigned SEED         = 1,
  parameter int unsigned INDEX        = 0,
  parameter int unsigned UNSTABLE_PCT = 4
) (
  input  logic eval,
  output logic id_bit
);
  function automatic logic [31:0] mix(logic [31:0] v);
    logic [31:0] h;
    h = v;
    h = h ^ (h >> 16);
    h = h * 32'h45d9f3b;
    h = h ^ (h >> 16);
    h = h * 32'h45d9f3b;
    h = h ^ (h >> 16);
    return h;
  endfunction

  localparam logic [31:0] H = mix(SEED * 32'h9e3779b1 + INDEX * 32'h85ebca6b + 32'h1234567);
  localparam bit UNSTABLE   = (32'(H[15:0]) % 100) < UNSTABLE_PCT;

  // thermal noise of an unstable cell: a free-running pseudo-random register
  // (its start value is whatever the simulator powers up with)
  logic [15:0] noise;

  always_ff @(negedge eval) begin
    noise <= {noise[14:0], noise[15] ^ noise[13] ^ noise[12] ^ noise[10]} ^ 16'(H);
    if (UNSTABLE) id_bit <= noise[15] ^ noise[3];
    else          id_bit <= H[20];
  end
endmodule
