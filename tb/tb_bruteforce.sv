// tb_bruteforce: the random-guessing attack on the boosted FSM.
//
// For added STGs of 12, 15 and 18 flip-flops and 3 or 8 inputs (and 12
// flip-flops with two black holes), the IC is
// powered up in random locked states and random inputs are applied until the
// functional reset state is reached, the black hole swallows the IC, or a
// budget of 1,000,000 guesses runs out (reported as not reached). Every step
// of the device is compared with the reference model of the added STG, and
// the outcome flags with the reference outcome. The averages are printed.
module tb_bruteforce;
  import tb_ref_pkg::*;
  localparam int RUNS = 40;
  localparam int CAP  = 1000000;
  int checks = 0, failures = 0;
  logic clk = 0;

  always #5 clk = ~clk;
  initial begin
    repeat (3000000) @(posedge clk);
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

  // one device per configuration
  `define BF_DUT(NAME, NM, IW, NB) \
    logic NAME``_load = 0, NAME``_xv = 0; \
    logic [3*NM+4:0] NAME``_lv = '0; \
    logic [IW-1:0] NAME``_x = '0; \
    logic NAME``_func, NAME``_lock, NAME``_bh, NAME``_bhe; \
    logic [2:0] NAME``_q; \
    logic [3*NM+4+2*NB:0] NAME``_st; \
    bfsm #(.N_MOD(NM), .IN_W(IW), .N_BH(NB)) NAME (.clk(clk), .load(NAME``_load), .load_val(NAME``_lv), \
      .group(2'd0), .rub_salt(6'd0), .x(NAME``_x), .x_valid(NAME``_xv), .disable_req(1'b0), .sticky(1'b0), \
      .functional(NAME``_func), .locked(NAME``_lock), .q_idx(NAME``_q), .bh_active(NAME``_bh), \
      .bh_enter(NAME``_bhe), .state(NAME``_st));

  `BF_DUT(d12_3, 4, 3, 1)
  `BF_DUT(d15_3, 5, 3, 1)
  `BF_DUT(d18_3, 6, 3, 1)
  `BF_DUT(d12_8, 4, 8, 1)
  `BF_DUT(d15_8, 5, 8, 1)
  `BF_DUT(d12_3b, 4, 3, 2)

  `define BF_RUN(NAME, NM, IW, NB) \
    begin \
      int unsigned a, x, g; \
      longint total, bh_total; \
      int unlocked, trapped, capped; \
      total = 0; bh_total = 0; unlocked = 0; trapped = 0; capped = 0; \
      for (int r = 0; r < RUNS; r++) begin \
        a = ($urandom % ((1 << (3 * NM)) - 1)) + 1; \
        @(negedge clk); \
        NAME``_load = 1; NAME``_lv = {5'd0, (3*NM)'(a)}; \
        @(negedge clk); \
        NAME``_load = 0; NAME``_xv = 1; \
        g = 0; \
        while (NAME``_lock && g < CAP) begin \
          x = $urandom % (1 << IW); \
          NAME``_x = IW'(x); \
          if (is_trap(a, x, NM, IW) || (NB > 1 && (a & 7) == 5 && x == 0)) a = 32'hffffffff; else a = add_step(a, x, NM, IW); \
          @(negedge clk); \
          g++; \
          if (a != 32'hffffffff && NAME``_lock) check(NAME``_st[3*NM-1:0] == (3*NM)'(a), "step matches reference"); \
          if (a == 32'hffffffff || a == 0) break; \
        end \
        NAME``_xv = 0; \
        check((a == 32'hffffffff) == NAME``_bh, "black hole outcome"); \
        check((a == 0) == NAME``_func, "unlock outcome"); \
        if (NAME``_bh) begin trapped++; bh_total += g; end \
        else if (NAME``_func) begin unlocked++; total += g; end \
        else capped++; \
      end \
      $display("%0d FFs, %0d inputs, %0d black hole(s): %0d runs, unlocked %0d (average %0d guesses), black hole %0d (after %0d guesses on average), not reached %0d", \
               3*NM, IW, NB, RUNS, unlocked, (unlocked > 0) ? int'(total / unlocked) : 0, trapped, \
               (trapped > 0) ? int'(bh_total / trapped) : 0, capped); \
      check(trapped > 0, "black hole catches random guessing"); \
    end

  initial begin
    `BF_RUN(d12_3, 4, 3, 1)
    `BF_RUN(d15_3, 5, 3, 1)
    `BF_RUN(d18_3, 6, 3, 1)
    `BF_RUN(d12_8, 4, 8, 1)
    `BF_RUN(d15_8, 5, 8, 1)
    `BF_RUN(d12_3b, 4, 3, 2)
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
