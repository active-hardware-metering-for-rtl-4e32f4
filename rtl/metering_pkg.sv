// metering_pkg: constants, encodings and next-state functions shared by the
// active-metering RTL.
//
// The protected design is the five-state example controller q0..q4 with a
// one-bit input. Its transition labels are the published ones; the three
// input values left open there (q0 on 0, q1 on 1, q4 on 1) are this design's
// choice and hold the state. State codes are also a design choice: q0..q4 use
// 000,001,010,100,111 and the three unused codes 011,101,110 serve as the dummy
// obfuscation states q5*,q6*,q7*, so that every flip-flop shows both a 0 and a
// 1 across the dummy group.
//
// The added state-transition graph is built from 3-bit modules. Each module is
// a ring counter over q0..q7 with q1 taken out of the ring (q0 jumps to q2),
// plus the extra edges q4->q1, q7->q3, q2->q2 and q7->q7. A 2-bit control u
// selects the edge: u=0 ring, u=1 extra edges (ring elsewhere), u=2 q7->q7 and
// hold elsewhere, u=3 hold.
package metering_pkg;

  typedef logic [2:0] qcode_t;

  // Codes of the original STG (q0..q4) and of the dummy states.
  localparam qcode_t Q0 = 3'b000;
  localparam qcode_t Q1 = 3'b001;
  localparam qcode_t Q2 = 3'b010;
  localparam qcode_t Q3 = 3'b100;
  localparam qcode_t Q4 = 3'b111;
  localparam qcode_t D5 = 3'b011;
  localparam qcode_t D6 = 3'b101;
  localparam qcode_t D7 = 3'b110;

  // Per-replica XOR mask on the state code (original FSM, SFFSM', SFFSM'').
  localparam qcode_t REP_MASK [3] = '{3'b000, 3'b101, 3'b011};

  // Logical index 0..4 of a code, 7 for a code that is not an original state.
  function automatic logic [2:0] code_to_idx(qcode_t c);
    case (c)
      Q0: return 3'd0;
      Q1: return 3'd1;
      Q2: return 3'd2;
      Q3: return 3'd3;
      Q4: return 3'd4;
      default: return 3'd7;
    endcase
  endfunction

  // Transition function of the original STG on input bit x.
  function automatic qcode_t orig_next(qcode_t c, logic x);
    case (c)
      Q0: return x ? Q4 : Q0;
      Q1: return x ? Q1 : Q0;
      Q2: return x ? Q0 : Q4;
      Q3: return x ? Q2 : Q1;
      Q4: return x ? Q4 : Q3;
      default: return c;
    endcase
  endfunction

  // Transition function of one 3-bit added-STG module.
  function automatic logic [2:0] mod_next(logic [2:0] s, logic [1:0] u);
    logic [2:0] ring;
    ring = (s == 3'd0 || s == 3'd1) ? 3'd2 : s + 3'd1;
    case (u)
      2'd0: return ring;
      2'd1: case (s)
              3'd2: return 3'd2;
              3'd4: return 3'd1;
              3'd7: return 3'd3;
              default: return ring;
            endcase
      default: return s;   // u=2: q7->q7 and hold elsewhere; u=3: hold
    endcase
  endfunction

endpackage
