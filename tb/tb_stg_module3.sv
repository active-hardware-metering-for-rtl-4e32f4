// tb_stg_module3: exhaustive check of the 3-bit added-STG module against the
// reference edge table, plus a check that from every state the module can
// reach every other state (strong connectivity of the module graph).
module tb_stg_module3;
  import tb_ref_pkg::*;
  int checks = 0, failures = 0;
  logic [2:0] s, s_next;
  logic [1:0] u;

  stg_module3 dut (.s(s), .u(u), .s_next(s_next));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bit reach [8][8];
    for (int i = 0; i < 8; i++)
      for (int k = 0; k < 4; k++) begin
        s = 3'(i);
        u = 2'(k);
        #1;
        checks++;
        if (int'(s_next) != MOD_TBL[k][i]) begin
          failures++;
          $display("FAIL s=%0d u=%0d got %0d", i, k, s_next);
        end
        reach[i][s_next] = 1;
      end
    // transitive closure of the graph seen at the outputs
    for (int k = 0; k < 8; k++)
      for (int i = 0; i < 8; i++)
        for (int j = 0; j < 8; j++)
          if (reach[i][k] && reach[k][j]) reach[i][j] = 1;
    for (int i = 0; i < 8; i++)
      for (int j = 0; j < 8; j++) begin
        checks++;
        if (!reach[i][j]) begin
          failures++;
          $display("FAIL no path q%0d -> q%0d", i, j);
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
