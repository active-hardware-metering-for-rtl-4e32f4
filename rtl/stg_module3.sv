// stg_module3: one 3-bit building block of the added state-transition graph.
//
// Purely combinational next-state logic for an eight-state sparse graph that
// starts from a ring counter, takes q1 out of the ring and adds a few extra
// edges so that every state still reaches every other (see metering_pkg for
// the edge list). The 2-bit control u picks which edge leaves the current
// state. The state flip-flops live in the enclosing boosted FSM, so several
// modules can be chained and share one state register.
module stg_module3 (
  input  logic [2:0] s,       // current module state q0..q7
  input  logic [1:0] u,       // edge select
  output logic [2:0] s_next   // next module state
);
  import metering_pkg::*;

  always_comb s_next = mod_next(s, u);

endmodule
