// tb_bfsm: the boosted FSM end to end at 15 added flip-flops and 3 inputs.
// Random power-up states are unlocked with keys from the reference search
// (with idle cycles mixed in, and on every other die a second, longer key
// through a detour), the original FSM is then run against the reference,
// with every flip-flop checked against the value fixed by group and state,
// and the black-hole entries (trap edge, disable request, a reset
// state copied from another RUB group) and the power-up guard are exercised.
// A second device with two black holes, both trapdoors, checks the second
// trap edge and the escape sequence.
module tb_bfsm;
  import tb_ref_pkg::*;
  localparam int N = 5, W = 3, AW = 15, SW = 20;
  int checks = 0, failures = 0;
  logic clk = 0, load, x_valid, disable_req, sticky;
  logic [SW-1:0] load_val;
  logic [1:0] group;
  logic [W-1:0] x;
  logic functional, locked, bh_active, bh_enter;
  logic [2:0] q_idx;
  logic [SW+1:0] state;
  int n_altkey = 0, n_unlock = 0, n_trap = 0, n_disable = 0, n_car = 0, n_hold = 0, n_dummy = 0;

  bfsm #(.N_MOD(N), .IN_W(W), .BH_STATES(2)) dut (
    .clk(clk), .load(load), .load_val(load_val), .group(group), .rub_salt(6'b010011), .x(x), .x_valid(x_valid),
    .disable_req(disable_req), .sticky(sticky), .functional(functional), .locked(locked),
    .q_idx(q_idx), .bh_active(bh_active), .bh_enter(bh_enter), .state(state));

  // second device: two trapdoor holes left by the sequence 5, 2, 7, 1
  localparam logic [127:0] SEQ = 128'h01_07_02_05;
  logic t_load, t_xv, t_func, t_lock, t_bh, t_bhe;
  logic [W-1:0] t_x;
  logic [SW-1:0] t_lv;
  logic [2:0] t_q;
  logic [SW+3:0] t_st;
  int n_trap2 = 0, n_escape = 0;
  bfsm #(.N_MOD(N), .IN_W(W), .BH_STATES(2), .N_BH(2), .TD_LEN(4), .TD_SEQ(SEQ)) dut2 (
    .clk(clk), .load(t_load), .load_val(t_lv), .group(2'd2), .rub_salt(6'b0), .x(t_x), .x_valid(t_xv),
    .disable_req(1'b0), .sticky(1'b0), .functional(t_func), .locked(t_lock), .q_idx(t_q),
    .bh_active(t_bh), .bh_enter(t_bhe), .state(t_st));

  always #5 clk = ~clk;
  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  task automatic power_up(logic [SW-1:0] v, logic st);
    @(negedge clk);
    load = 1; load_val = v; sticky = st; x_valid = 0;
    @(negedge clk);
    load = 0;
  endtask

  task automatic step(logic [W-1:0] in);
    x = in; x_valid = 1;
    @(negedge clk);
    x_valid = 0;
  endtask

  initial begin
    int unsigned key[$];
    logic [AW-1:0] a0;
    logic [SW+1:0] snap;
    int q;
    t_load = 0; t_xv = 0; t_x = 0; t_lv = 0;
    load = 0; x_valid = 0; disable_req = 0; sticky = 0; x = 0; load_val = 0; group = 0;
    for (int r = 0; r < 12; r++) begin
      group = 2'(r % 3);
      a0 = AW'($urandom) | AW'(1);
      if (a0[AW-1 -: 3] == 3'd6) a0[AW-1 -: 3] = 3'd5;   // the trap is tested separately
      power_up({5'($urandom), a0}, 0);
      check(locked && !functional && !bh_active, "locked after power-up");
      find_key(a0, N, W, key);
      if (r % 2 == 1) begin
        // a second, different key: a detour input first, then the shortest
        // key from where the detour leads
        int unsigned k2[$];
        int unsigned d, a1;
        d = (key[0] + 1 + $urandom % 6) % 8;
        if (is_trap(a0, d, N, W)) d = (d + 1) % 8;
        a1 = add_step(a0, d, N, W);
        if (a1 != 0) begin
          find_key(a1, N, W, k2);
          k2.push_front(d);
          check(k2 != key, "second key differs");
          key = k2;
          n_altkey++;
        end
      end
      foreach (key[i]) begin
        if ($urandom % 3 == 0) begin             // idle cycle: nothing may move
          snap = state;
          @(negedge clk);
          check(state == snap, "holds without input");
          n_hold++;
        end
        check(locked, "still locked before the key ends");
        step(W'(key[i]));
        if (i < key.size() - 1) begin
          check(is_dummy(int'(state[AW+2:AW])), "original FFs in dummy states");
          n_dummy++;
        end
      end
      check(functional && q_idx == 0 && state[AW-1:0] == 0, "unlocked into q0");
      check(int'(state[AW+4:AW]) == ((r % 3) << 3 | MASKS[r % 3]), "reset code of own replica");
      n_unlock++;
      q = 0;
      for (int t = 0; t < 30; t++) begin
        logic [W-1:0] in;
        in = W'($urandom);
        step(in);
        q = ORIG_NEXT[q][in[0]];
        check(functional && int'(q_idx) == q, "original FSM follows reference");
        // every flip-flop is now a fixed function of the group and q: no
        // die-specific activity once unlocked
        check(state == {2'b00, 2'(r % 3), 3'(ORIG_CODE[q] ^ MASKS[r % 3]), AW'(0)},
              "whole state deterministic when unlocked");
      end
      if (r % 4 == 0) begin                      // remote disable from the functional FSM
        @(negedge clk);
        disable_req = 1;
        @(negedge clk);
        disable_req = 0;
        check(bh_active && !functional && !locked, "remote disable");
        snap = state;
        repeat (20) step(W'($urandom));
        check(bh_active && state[AW+4:0] == snap[AW+4:0], "no way out of the black hole");
        n_disable++;
      end
    end
    // trap edge from the added STG
    power_up({5'd0, 3'd6, 12'h5A5}, 0);
    step('1);
    check(bh_active, "trap edge enters black hole");
    n_trap++;
    // power-up guard and permanent record
    power_up({5'd0, 15'h0123}, 0);
    check(!bh_active && locked, "power-up never inside the black hole");
    power_up({5'd0, 15'h0123}, 1);
    check(bh_active, "permanent record holds the black hole across power-up");
    // reset state of another group loaded directly (capture-and-replay)
    group = 2'd1;
    power_up({2'd2, 3'(MASKS[2]), 15'd0}, 0);
    check(!functional, "foreign reset code is not functional");
    @(negedge clk);
    check(bh_active, "foreign reset code sends the IC to the black hole");
    n_car++;
    power_up({2'd1, 3'(MASKS[1]), 15'd0}, 0);
    @(negedge clk);
    check(functional && q_idx == 0 && !bh_active, "own reset code accepted");
    // second trap edge and the trapdoor sequence (with a false start)
    begin
      logic [W-1:0] tseq [6] = '{3'd5, 3'd5, 3'd2, 3'd7, 3'd1, 3'd0};
      t_xv = 0; t_x = 0;
      @(negedge clk);
      t_load = 1; t_lv = {5'd0, 12'h2A4, 3'd5};
      @(negedge clk);
      t_load = 0;
      t_x = 3'd0; t_xv = 1;
      @(negedge clk);
      check(t_bh && t_st[SW+3:SW+2] == 2'b10, "second trap edge enters black hole 1");
      n_trap2 += int'(t_bh);
      for (int i = 0; i < 5; i++) begin
        check(t_bh, "inside until the trapdoor sequence ends");
        t_x = tseq[i];
        @(negedge clk);
      end
      t_xv = 0;
      check(!t_bh && t_func && t_q == 0, "trapdoor sequence leads to q0");
      n_escape += int'(t_func);
      t_load = 1; t_lv = {5'd0, 3'd6, 12'h5A5};
      @(negedge clk);
      t_load = 0; t_x = '1; t_xv = 1;
      @(negedge clk);
      t_x = 3'd4;
      @(negedge clk);
      t_xv = 0;
      check(t_bh && t_st[SW+3:SW+2] == 2'b01, "first trap edge enters black hole 0");
    end
    check(n_trap2 > 0 && n_escape > 0, "second hole and trapdoor exercised");
    check(n_altkey > 0, "alternative keys exercised");
    $display("altkey=%0d unlock=%0d hold=%0d dummy=%0d disable=%0d trap=%0d car=%0d",
             n_altkey, n_unlock, n_hold, n_dummy, n_disable, n_trap, n_car);
    check(n_unlock > 0 && n_hold > 0 && n_dummy > 0 && n_disable > 0 && n_trap > 0 && n_car > 0,
          "every mechanism exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
