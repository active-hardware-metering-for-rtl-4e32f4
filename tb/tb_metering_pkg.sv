// tb_metering_pkg: checks the package functions (original-STG transitions,
// state decode, added-STG module edges) exhaustively against the reference
// tables.
module tb_metering_pkg;
  import metering_pkg::*;
  import tb_ref_pkg::*;
  int checks = 0, failures = 0;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int q = 0; q < 5; q++)
      for (int x = 0; x < 2; x++)
        check(int'(orig_next(3'(ORIG_CODE[q]), 1'(x))) == ORIG_CODE[ORIG_NEXT[q][x]],
              $sformatf("orig_next q%0d x=%0d", q, x));
    for (int c = 0; c < 8; c++)
      check(int'(code_to_idx(3'(c))) == ((code_idx(c) < 0) ? 7 : code_idx(c)), $sformatf("idx %0d", c));
    for (int s = 0; s < 8; s++)
      for (int u = 0; u < 4; u++)
        check(int'(mod_next(3'(s), 2'(u))) == MOD_TBL[u][s], $sformatf("mod_next s=%0d u=%0d", s, u));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
