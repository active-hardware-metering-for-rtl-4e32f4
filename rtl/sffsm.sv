// sffsm: the original FSM and its two RUB-specific replicas (specialised
// functional FSMs).
//
// The original-STG register holds {replica, code}. Replica r stores state q as
// {r, code(q) ^ REP_MASK[r]}, so the reset state and every other state have a
// different code on ICs of different RUB groups while the input/output
// behaviour is the same. A register value is valid only if its replica field
// equals the IC's own group and its code decodes to one of q0..q4; a reset
// state copied from another IC's group is therefore rejected. The replica
// masks are this design's choice. Combinational.
module sffsm (
  input  logic [4:0] code,       // {replica, masked state code}
  input  logic [1:0] group,      // this IC's RUB group
  input  logic       x0,         // FSM input bit
  output logic [4:0] code_next,  // next value while functional
  output logic       valid,      // code is a state of this IC's replica
  output logic [2:0] q_idx,      // logical state q0..q4 (7 if invalid)
  output logic [4:0] reset_code  // code of q0 in this IC's replica
);
  import metering_pkg::*;

  qcode_t mask, plain;
  always_comb begin
    mask       = REP_MASK[(group > 2'd2) ? 2'd0 : group];
    plain      = code[2:0] ^ mask;
    q_idx      = code_to_idx(plain);
    valid      = (code[4:3] == group) && (q_idx != 3'd7);
    code_next  = {group, orig_next(plain, x0) ^ mask};
    reset_code = {group, Q0 ^ mask};
  end
endmodule
