// added_stg: the added part of the boosted FSM, N_MOD interconnected 3-bit
// modules (3*N_MOD flip-flops held by the caller).
//
// Module i is steered by u_i = {x[(2i+1)%IN_W], x[(2i)%IN_W]} ^ s_(i-1)[1:0]
// ^ i[1:0], so each module's edge depends on the primary input and on its
// neighbour's state; the module before module 0 is the last one. This coupling
// was chosen by an exhaustive search that confirmed, for 12 and 15 flip-flops
// and 3 to 8 inputs, that every added state has an input sequence to the exit
// that never takes the trap edge.
//
// The all-zero value of the added register is the functional code: the
// transition whose next value is zero is the transition into the reset state
// q0 of the original STG (to_reset). The trap edge (top module in state
// BH_TRAP_MOD_STATE with input BH_TRAP_IN) leads into black hole 0; with
// N_BH = 2 a second trap edge (module 0 in state 5 with the all-zero input)
// leads into black hole 1. The same search confirmed that every added state
// still reaches the exit while avoiding both trap edges.
// Combinational; one evaluation per applied input.
module added_stg #(
  parameter int unsigned N_MOD = 5,
  parameter int unsigned IN_W  = 3,
  parameter int unsigned N_BH  = 1,
  parameter logic [2:0]  BH_TRAP_MOD_STATE = 3'd6,
  parameter logic [IN_W-1:0] BH_TRAP_IN = '1
) (
  input  logic [3*N_MOD-1:0] a,
  input  logic [IN_W-1:0]    x,
  output logic [3*N_MOD-1:0] a_next,
  output logic               to_reset,
  output logic [N_BH-1:0]    to_bh
);
  logic [1:0] u [N_MOD];

  for (genvar i = 0; i < N_MOD; i++) begin : g_mod
    localparam int unsigned PREV = (i + N_MOD - 1) % N_MOD;
    localparam int unsigned B0   = (2 * i) % IN_W;
    localparam int unsigned B1   = (2 * i + 1) % IN_W;
    localparam logic [1:0]  IDX  = 2'(i);
    assign u[i] = {x[B1], x[B0]} ^ a[3*PREV +: 2] ^ IDX;
    stg_module3 u_mod (.s(a[3*i +: 3]), .u(u[i]), .s_next(a_next[3*i +: 3]));
  end

  assign to_bh[0] = (a[3*(N_MOD-1) +: 3] == BH_TRAP_MOD_STATE) && (x == BH_TRAP_IN);
  if (N_BH > 1) begin : g_trap2
    assign to_bh[1] = (a[2:0] == 3'd5) && (x == '0);
  end
  assign to_reset = !(|to_bh) && (a_next == '0);

  initial assert (N_BH >= 1 && N_BH <= 2) else $error("N_BH must be 1 or 2");

endmodule
