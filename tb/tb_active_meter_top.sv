// tb_active_meter_top: end-to-end test of the metered core at its default
// sizes (15 added flip-flops, 3 inputs, 32-word key store, attack limit 4096).
//
// It walks through the life of one die: factory erase, first power-up in a
// locked state, read-out of the flip-flops through the scan port, key
// computation by the reference search (the design owner's job), programming
// of key and saved ID, repeated power-ups that unlock in exactly 2 + key
// length cycles, normal operation of the original FSM, and then each way into
// the black hole: remote disable, the permanent record across power-up, a
// brute-force attack caught by the attempt limit, the trap edge, and a reset
// state copied from another RUB group. Every mechanism is counted and one
// that never happened is a failure.
module tb_active_meter_top;
  import tb_ref_pkg::*;
  localparam int N = 5, W = 3, AW = 15, SW = 20, STW = 22, KAW = 5, KLW = 6;
  int checks = 0, failures = 0;

  logic clk = 0, rst_n, in_valid, ready, functional, locked, disabled, remote_disable;
  logic [W-1:0] in;
  logic [2:0] q_idx;
  logic prog_clr, prog_we_key, prog_we_len, prog_we_rub, scan_capture, scan_shift, scan_out;
  logic [KAW-1:0] prog_addr;
  logic [W-1:0] prog_key;
  logic [KLW-1:0] prog_len;
  logic [SW-1:0] prog_rub;
  logic [SW+5:0] rub_id;

  active_meter_top dut (
    .clk(clk), .rst_n(rst_n), .in(in), .in_valid(in_valid), .ready(ready), .functional(functional),
    .locked(locked), .disabled(disabled), .q_idx(q_idx), .remote_disable(remote_disable),
    .prog_clr(prog_clr), .prog_we_key(prog_we_key), .prog_addr(prog_addr), .prog_key(prog_key),
    .prog_we_len(prog_we_len), .prog_len(prog_len), .prog_we_rub(prog_we_rub), .prog_rub(prog_rub),
    .scan_capture(scan_capture), .scan_shift(scan_shift), .scan_out(scan_out), .rub_id(rub_id));

  int n_locked_powerup = 0, n_scan = 0, n_unlock = 0, n_func = 0, n_obf = 0, n_remote = 0,
      n_permanent = 0, n_bruteforce = 0, n_trap = 0, n_car = 0;

  always #5 clk = ~clk;
  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog");
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

  // power cycle; returns the number of cycles from rst_n rising to ready
  task automatic power_cycle(output int cyc);
    @(negedge clk);
    rst_n = 0; in_valid = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    cyc = 0;
    while (!ready && cyc < 100) begin
      @(negedge clk);
      cyc++;
    end
  endtask

  task automatic erase();
    @(negedge clk);
    prog_clr = 1;
    @(negedge clk);
    prog_clr = 0;
  endtask

  task automatic scan(output logic [STW-1:0] v);
    @(negedge clk);
    scan_capture = 1;
    @(negedge clk);
    scan_capture = 0; scan_shift = 1;
    for (int i = 0; i < STW; i++) begin
      v[i] = scan_out;
      @(negedge clk);
    end
    scan_shift = 0;
    n_scan++;
  endtask

  task automatic store_key(int unsigned key[$], logic [SW-1:0] rubv, bit with_rub);
    foreach (key[i]) begin
      @(negedge clk);
      prog_we_key = 1; prog_addr = KAW'(i); prog_key = W'(key[i]);
    end
    @(negedge clk);
    prog_we_key = 0; prog_we_len = 1; prog_len = KLW'(key.size());
    prog_we_rub = with_rub; prog_rub = rubv;
    @(negedge clk);
    prog_we_len = 0; prog_we_rub = 0;
  endtask

  task automatic user(logic [W-1:0] v);
    in = v; in_valid = 1;
    @(negedge clk);
    in_valid = 0;
  endtask

  initial begin
    logic [STW-1:0] sv, sv2;
    logic [SW-1:0] pu;
    int unsigned key[$];
    int unsigned none[$];
    int cyc, q, g, lo, hi, tries;
    rst_n = 0; in = 0; in_valid = 0; remote_disable = 0; prog_clr = 0; prog_we_key = 0; prog_addr = 0;
    prog_key = 0; prog_we_len = 0; prog_len = 0; prog_we_rub = 0; prog_rub = 0; scan_capture = 0; scan_shift = 0;
    erase();
    // 1. first power-up: locked, read out
    power_cycle(cyc);
    check(cyc == 2, $sformatf("empty key: ready after %0d cycles", cyc));
    check(locked && !functional && !disabled, "die powers up locked");
    n_locked_powerup += int'(locked);
    scan(sv);
    check(sv[SW-1:0] == rub_id[SW-1:0], "scanned state equals the power-up ID");
    pu = sv[SW-1:0];
    lo = ($countones(rub_id[SW+2:SW]) >= 2) ? 1 : 0;
    hi = ($countones(rub_id[SW+5:SW+3]) >= 2) ? 1 : 0;
    g = (hi * 2 + lo == 3) ? 0 : hi * 2 + lo;
    // 2. the owner computes the key; the foundry stores it with the saved ID
    find_key(int'(pu[AW-1:0]), N, W, key);
    $display("power-up state %h, group %0d, key length %0d", pu, g, key.size());
    store_key(key, pu, 1);
    for (int r = 0; r < 4; r++) begin
      power_cycle(cyc);
      check(cyc == 2 + key.size(), $sformatf("unlock latency %0d, expected %0d", cyc, 2 + key.size()));
      check(functional && q_idx == 0 && !locked, "unlocked into q0");
      n_unlock += int'(functional);
      scan(sv2);
      check(sv2[AW-1:0] == 0, "added flip-flops quiet once unlocked");
      q = 0;
      for (int t = 0; t < 40; t++) begin
        logic [W-1:0] v;
        v = W'($urandom);
        user(v);
        q = ORIG_NEXT[q][v[0]];
        check(functional && int'(q_idx) == q, "original FSM behaviour");
      end
      n_func++;
    end
    // 3. obfuscation while locked: empty key, saved ID, inputs that never take the trap
    erase();
    store_key(none, pu, 1);
    power_cycle(cyc);
    for (int t = 0; t < 8; t++) begin
      user(W'($urandom % 7));
      scan(sv2);
      if (sv2[AW-1:0] != 0) begin
        check(is_dummy(int'(sv2[AW+2:AW])), "original flip-flops hold a dummy code while locked");
        n_obf++;
      end
    end
    // 4. remote disable and the permanent record
    store_key(key, pu, 1);
    power_cycle(cyc);
    check(functional, "unlocked again");
    @(negedge clk);
    remote_disable = 1;
    @(negedge clk);
    remote_disable = 0;
    @(negedge clk);
    check(disabled && !functional, "remote disable");
    n_remote += int'(disabled);
    power_cycle(cyc);
    check(disabled && !functional, "still disabled after power-up");
    n_permanent += int'(disabled);
    erase();
    store_key(key, pu, 1);
    power_cycle(cyc);
    check(functional && !disabled, "erased record: works again");
    // 5. brute-force attack: no key stored, random guesses until the limit
    erase();
    store_key(none, pu, 1);
    power_cycle(cyc);
    tries = 0;
    while (!disabled && !functional && tries < 5000) begin
      user(W'($urandom % 7));
      tries++;
    end
    @(negedge clk);
    $display("brute force: %0d guesses, disabled=%0d functional=%0d", tries, disabled, functional);
    // the 4096th guess trips the detector; the guess offered in the next cycle
    // meets the black-hole entry and is not taken
    check(disabled && tries == 4097, "attempt limit trips the black hole");
    n_bruteforce += int'(disabled);
    // 6. trap edge
    erase();
    store_key(none, {5'd0, 3'd6, 12'h5A5}, 1);
    power_cycle(cyc);
    check(locked, "locked at trap state");
    user('1);
    @(negedge clk);
    check(disabled, "trap edge enters the black hole");
    n_trap += int'(disabled);
    // 7. reset state of a different group loaded as the power-up state
    erase();
    store_key(none, {2'((g + 1) % 3), 3'(MASKS[(g + 1) % 3]), 15'd0}, 1);
    power_cycle(cyc);
    @(negedge clk);
    check(disabled && !functional, "foreign reset state rejected");
    n_car += int'(disabled);
    erase();
    store_key(none, {2'(g), 3'(MASKS[g]), 15'd0}, 1);
    power_cycle(cyc);
    @(negedge clk);
    check(functional && q_idx == 0, "own reset state accepted");

    $display("locked_powerup=%0d scan=%0d unlock=%0d func=%0d obf=%0d remote=%0d permanent=%0d bruteforce=%0d trap=%0d car=%0d",
             n_locked_powerup, n_scan, n_unlock, n_func, n_obf, n_remote, n_permanent, n_bruteforce, n_trap, n_car);
    check(n_locked_powerup > 0, "mechanism: locked power-up");
    check(n_scan > 0, "mechanism: scan read-out");
    check(n_unlock > 0, "mechanism: unlock by stored key");
    check(n_func > 0, "mechanism: original FSM");
    check(n_obf > 0, "mechanism: dummy-state obfuscation");
    check(n_remote > 0, "mechanism: remote disable");
    check(n_permanent > 0, "mechanism: permanent black hole");
    check(n_bruteforce > 0, "mechanism: brute-force detection");
    check(n_trap > 0, "mechanism: trap edge");
    check(n_car > 0, "mechanism: replica check");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
