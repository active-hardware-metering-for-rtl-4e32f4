// bfsm: the boosted finite state machine, the lock of an actively metered IC.
//
// State: the added-STG register a (3*N_MOD bits), the original-STG register
// orig ({replica, code}, 5 bits) and the black hole. On `load` (power-up) a
// and orig take the chip's random ID, so the IC starts in one of the 2^(3N)
// added states with overwhelming probability and is locked. Each applied
// input (x_valid) moves the added STG; the original-STG flip-flops meanwhile
// wander through dummy states (obf_glue). The transition into added value 0
// puts orig into the reset state q0 of this IC's replica (sffsm) and from then
// on the IC runs the original FSM on input bit x[0] while a stays 0, the same
// on every unlocked IC. Only someone who knows the graph can compute the input
// sequence (key) from a read-out power-up state to q0.
//
// Into black hole 0 lead: its trap edge in the added STG, a remote-disable or
// attack request (disable_req), and an original-STG value that is not a state
// of this IC's replica (e.g. a reset state copied from another IC). With
// N_BH = 2 a second black hole has its own trap edge. With TD_LEN > 0 the holes
// are trapdoors: the secret sequence TD_SEQ leads out of them into q0. The
// state holds when x_valid is low; this and all encodings are this design's
// choices.
// Outputs are registered-state decodes; one input per clock.
module bfsm #(
  parameter int unsigned N_MOD     = 5,
  parameter int unsigned IN_W      = 3,
  parameter int unsigned BH_STATES = 2,
  parameter bit          PERMANENT = 1'b1,
  parameter int unsigned N_BH      = 1,
  parameter int unsigned TD_LEN    = 0,
  parameter logic [127:0] TD_SEQ   = '0,
  localparam int unsigned AW = 3 * N_MOD,
  localparam int unsigned SW = AW + 5,
  localparam int unsigned HW = (BH_STATES > 1) ? $clog2(BH_STATES) : 1,
  localparam int unsigned BW = N_BH * (1 + HW)
) (
  input  logic            clk,
  input  logic            load,         // power-up load from the RUB
  input  logic [SW-1:0]   load_val,     // {orig, a}
  input  logic [1:0]      group,        // RUB group of this IC
  input  logic [5:0]      rub_salt,     // ID bits folded into the obfuscation
  input  logic [IN_W-1:0] x,
  input  logic            x_valid,
  input  logic            disable_req,
  input  logic            sticky,
  output logic            functional,
  output logic            locked,
  output logic [2:0]      q_idx,
  output logic            bh_active,
  output logic            bh_enter,
  output logic [SW+BW-1:0] state        // {bh active flags, bh states, orig, a}
);
  logic [AW-1:0] a, a_next;
  logic [4:0]    orig, orig_func_next, orig_dummy_next, reset_code;
  logic          to_reset, valid, is_locked, escape;
  logic [N_BH-1:0]    to_bh, bh_act, bh_esc, bh_in;
  logic [N_BH*HW-1:0] bh_h;

  added_stg #(.N_MOD(N_MOD), .IN_W(IN_W), .N_BH(N_BH)) u_added (
    .a(a), .x(x), .a_next(a_next), .to_reset(to_reset), .to_bh(to_bh));

  sffsm u_sffsm (
    .code(orig), .group(group), .x0(x[0]), .code_next(orig_func_next),
    .valid(valid), .q_idx(q_idx), .reset_code(reset_code));

  obf_glue #(.N_MOD(N_MOD), .IN_W(IN_W)) u_glue (
    .a(a), .x(x), .salt(rub_salt), .code_next(orig_dummy_next));

  for (genvar j = 0; j < N_BH; j++) begin : g_bh
    black_hole #(.BH_STATES(BH_STATES), .PERMANENT(PERMANENT), .IN_W(IN_W),
                 .TD_LEN(TD_LEN), .TD_SEQ(TD_SEQ)) u_bh (
      .clk(clk), .powerup(load), .sticky(sticky && j == 0), .enter(bh_in[j]),
      .x(x), .x_valid(x_valid), .active(bh_act[j]), .escape(bh_esc[j]),
      .h(bh_h[HW*j +: HW]));
  end

  assign bh_active = |bh_act;
  assign escape    = |bh_esc;
  assign is_locked = (a != '0);

  // entry requests; the record of a permanent disable re-enters hole 0
  always_comb begin
    bh_in = '0;
    if (!load && !bh_active) begin
      if (disable_req || (!is_locked && !valid)) bh_in[0] = 1'b1;
      else if (is_locked && x_valid)            bh_in = to_bh;
    end
  end
  assign bh_enter = |bh_in;

  always_ff @(posedge clk) begin
    if (load) begin
      a    <= load_val[AW-1:0];
      orig <= load_val[SW-1:AW];
    end else if (escape) begin
      a    <= '0;
      orig <= reset_code;
    end else if (!bh_active && !bh_enter && x_valid) begin
      if (is_locked) begin
        a    <= a_next;
        orig <= to_reset ? reset_code : orig_dummy_next;
      end else begin
        orig <= orig_func_next;
      end
    end
  end

  assign functional = !bh_active && !is_locked && valid;
  assign locked     = !bh_active && is_locked;
  assign state      = {bh_act, bh_h, orig, a};
endmodule
