// tb_added_stg: compares the added STG (5 modules, 3 inputs) with the
// reference step function on random states and inputs, checks the exit and
// trap flags, and checks that the reference key from random states reaches
// the exit through the DUT in exactly the key length.
module tb_added_stg;
  import tb_ref_pkg::*;
  localparam int N = 5, W = 3;
  int checks = 0, failures = 0;
  logic [3*N-1:0] a, a_next;
  logic [W-1:0]   x;
  logic           to_reset, to_bh;

  added_stg #(.N_MOD(N), .IN_W(W)) dut (.a(a), .x(x), .a_next(a_next), .to_reset(to_reset), .to_bh(to_bh));

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int unsigned key[$];
    int unsigned exp;
    int traps = 0, exits = 0;
    for (int t = 0; t < 20000; t++) begin
      a = (t % 7 == 0) ? {3'd6, 12'($urandom)} : 15'($urandom);
      x = 3'($urandom);
      #1;
      exp = add_step(a, x, N, W);
      check(a_next == 15'(exp), $sformatf("step a=%h x=%0d", a, x));
      check(to_bh == is_trap(a, x, N, W), "trap flag");
      check(to_reset == (!is_trap(a, x, N, W) && exp == 0), "exit flag");
      traps += int'(to_bh);
    end
    for (int t = 0; t < 20; t++) begin
      a = 15'($urandom) | 15'd1;
      find_key(a, N, W, key);
      check(key.size() > 0 && key.size() <= 11, $sformatf("key length %0d", key.size()));
      foreach (key[i]) begin
        x = 3'(key[i]);
        #1;
        check(!to_bh, "key avoids trap");
        check(to_reset == (i == key.size() - 1), "exit exactly at key end");
        exits += int'(to_reset);
        a = a_next;
      end
    end
    check(traps > 0 && exits == 20, "trap and exit both exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
