// tb_sffsm: exhaustive check of the replicated original FSM: validity of every
// register value for every group, next state and logical index for valid
// values, and the replica reset codes, all against the reference tables.
module tb_sffsm;
  import tb_ref_pkg::*;
  int checks = 0, failures = 0;
  logic [4:0] code, code_next, reset_code;
  logic [1:0] group;
  logic       x0, valid;
  logic [2:0] q_idx;

  sffsm dut (.code(code), .group(group), .x0(x0), .code_next(code_next), .valid(valid),
             .q_idx(q_idx), .reset_code(reset_code));

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
    int q, eq;
    for (int g = 0; g < 3; g++)
      for (int c = 0; c < 32; c++)
        for (int x = 0; x < 2; x++) begin
          code = 5'(c); group = 2'(g); x0 = 1'(x);
          #1;
          q  = code_idx((c & 7) ^ MASKS[g]);
          eq = ((c >> 3) == g) && q >= 0;
          check(valid == 1'(eq), $sformatf("valid g=%0d c=%0d", g, c));
          check(reset_code == 5'((g << 3) | MASKS[g]), "reset code");
          if (eq) begin
            check(int'(q_idx) == q, "q_idx");
            check(int'(code_next) == ((g << 3) | (ORIG_CODE[ORIG_NEXT[q][x]] ^ MASKS[g])),
                  $sformatf("next g=%0d q%0d x=%0d", g, q, x));
          end
        end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
