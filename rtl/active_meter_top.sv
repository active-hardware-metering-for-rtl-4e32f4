// active_meter_top: core of an actively metered IC.
//
// The chip's random ID (rub) seeds the boosted FSM (bfsm) at power-up, so each
// die starts locked in its own state of a large added state graph. The foundry
// reads the flip-flops out through scan_readout and sends them to the design
// owner, who computes the input sequence (key) that walks that state to the
// reset state of the original FSM. The key, and optionally the power-up ID it
// was computed for, are written into key_store; from then on key_sequencer
// replays the key at every power-up before handing the inputs to the user.
// Wrong inputs while locked are counted by attack_detector, which, like the
// remote_disable pin, sends the IC into the black hole; with PERMANENT set the
// store keeps a record so the IC stays disabled across power cycles.
//
// Timing: rst_n low is power off. After rst_n rises the ID is evaluated (1
// cycle), loaded (1 cycle), the stored key is applied (key_len cycles) and the
// core runs (ready=1). in_valid applies one user input per clock; q_idx is the
// state q0..q4 of the original FSM while functional=1. The ID bits for the
// power-up state are load_val = {orig, a}; the top six bits select the RUB
// group (SFFSM replica). CHIP_SEED stands for the die's process variation.
// N_BH (1 or 2) sets the number of black holes, TD_LEN/TD_SEQ turn them into
// trapdoor holes (see black_hole); the defaults give one true black hole.
module active_meter_top #(
  parameter int unsigned N_MOD     = 5,
  parameter int unsigned IN_W      = 3,
  parameter int unsigned BH_STATES = 2,
  parameter int unsigned KEY_MAX   = 32,
  parameter int unsigned LIMIT     = 4096,
  parameter int unsigned CHIP_SEED = 1,
  parameter int unsigned N_BH      = 1,
  parameter int unsigned TD_LEN    = 0,
  parameter logic [127:0] TD_SEQ   = '0,
  localparam int unsigned SW  = 3 * N_MOD + 5,
  localparam int unsigned HW  = (BH_STATES > 1) ? $clog2(BH_STATES) : 1,
  localparam int unsigned STW = SW + N_BH * (1 + HW),
  localparam int unsigned KAW = $clog2(KEY_MAX),
  localparam int unsigned KLW = $clog2(KEY_MAX + 1)
) (
  input  logic            clk,
  input  logic            rst_n,
  // user side
  input  logic [IN_W-1:0] in,
  input  logic            in_valid,
  output logic            ready,
  output logic            functional,
  output logic            locked,
  output logic            disabled,
  output logic [2:0]      q_idx,
  input  logic            remote_disable,
  // key programming (test floor)
  input  logic            prog_clr,
  input  logic            prog_we_key,
  input  logic [KAW-1:0]  prog_addr,
  input  logic [IN_W-1:0] prog_key,
  input  logic            prog_we_len,
  input  logic [KLW-1:0]  prog_len,
  input  logic            prog_we_rub,
  input  logic [SW-1:0]   prog_rub,
  // flip-flop read-out
  input  logic            scan_capture,
  input  logic            scan_shift,
  output logic            scan_out,
  output logic [SW+5:0]   rub_id          // raw ID, for characterisation
);
  logic [SW+5:0]   id;
  logic            rub_eval, load, play, done, trip, sticky, rub_valid, bh_enter;
  logic [SW-1:0]   rub_saved, load_val;
  logic [1:0]      group;
  logic [KAW-1:0]  key_addr;
  logic [IN_W-1:0] key_word, x_key, x;
  logic [KLW-1:0]  key_len;
  logic            x_valid;
  logic [STW-1:0]  state;

  rub #(.K(SW + 6), .SEED(CHIP_SEED)) u_rub (.eval(rub_eval), .id(id));

  rub_group u_group (.rub_bits(id[SW +: 6]), .group(group));

  key_store #(.KEY_MAX(KEY_MAX), .IN_W(IN_W), .RUB_W(SW)) u_store (
    .clk(clk), .clr(prog_clr), .we_key(prog_we_key), .waddr(prog_addr), .wdata(prog_key),
    .we_len(prog_we_len), .wlen(prog_len), .we_rub(prog_we_rub), .wrub(prog_rub),
    .set_sticky(bh_enter), .raddr(key_addr), .rdata(key_word), .key_len(key_len),
    .rub_valid(rub_valid), .rub_saved(rub_saved), .sticky(sticky));

  key_sequencer #(.KEY_MAX(KEY_MAX), .IN_W(IN_W)) u_seq (
    .clk(clk), .rst_n(rst_n), .key_len(key_len), .key_word(key_word), .key_addr(key_addr),
    .rub_eval(rub_eval), .load(load), .play(play), .x_key(x_key), .done(done));

  assign load_val = rub_valid ? rub_saved : id[SW-1:0];
  assign x        = play ? x_key : in;
  assign x_valid  = play || (done && in_valid);

  attack_detector #(.LIMIT(LIMIT)) u_det (
    .clk(clk), .rst_n(rst_n), .attempt(done && in_valid && locked), .trip(trip));

  bfsm #(.N_MOD(N_MOD), .IN_W(IN_W), .BH_STATES(BH_STATES), .N_BH(N_BH),
         .TD_LEN(TD_LEN), .TD_SEQ(TD_SEQ)) u_bfsm (
    .clk(clk), .load(load), .load_val(load_val), .group(group), .rub_salt(id[SW +: 6]),
    .x(x), .x_valid(x_valid),
    .disable_req(done && (remote_disable || trip)), .sticky(sticky),
    .functional(functional), .locked(locked), .q_idx(q_idx), .bh_active(disabled),
    .bh_enter(bh_enter), .state(state));

  scan_readout #(.W(STW)) u_scan (
    .clk(clk), .capture(scan_capture), .shift(scan_shift), .state(state), .so(scan_out));

  assign ready  = done;
  assign rub_id = id;
endmodule
