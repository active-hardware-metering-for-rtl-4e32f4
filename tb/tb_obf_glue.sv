// tb_obf_glue: the glue must put only dummy codes into the original-STG
// flip-flops, use all three dummy states, and make every one of the five
// flip-flops take both values over a random walk of the added STG; a die
// with other ID bits must see a different pattern for the same walk.
module tb_obf_glue;
  import tb_ref_pkg::*;
  localparam int N = 5, W = 3;
  int checks = 0, failures = 0;
  logic [3*N-1:0] a;
  logic [W-1:0]   x;
  logic [4:0]     cn, cn2;
  logic [5:0]     salt;

  obf_glue #(.N_MOD(N), .IN_W(W)) dut (.a(a), .x(x), .salt(salt), .code_next(cn));
  obf_glue #(.N_MOD(N), .IN_W(W)) dut2 (.a(a), .x(x), .salt(~salt), .code_next(cn2));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bit seen1 [5];
    bit seen0 [5];
    bit dseen [8];
    int differ = 0;
    a = 15'h1234;
    salt = 6'b101100;
    for (int t = 0; t < 2000; t++) begin
      x = 3'($urandom);
      #1;
      checks++;
      if (!is_dummy(int'(cn[2:0]))) begin
        failures++;
        $display("FAIL non-dummy code %b", cn);
      end
      dseen[cn[2:0]] = 1;
      differ += int'(cn != cn2);
      for (int b = 0; b < 5; b++) if (cn[b]) seen1[b] = 1; else seen0[b] = 1;
      a = 15'(add_step(a, x, N, W));
      if (a == 0) a = 15'($urandom) | 1;
    end
    for (int b = 0; b < 5; b++) begin
      checks++;
      if (!(seen1[b] && seen0[b])) begin
        failures++;
        $display("FAIL bit %0d never toggles", b);
      end
    end
    checks++;
    if (differ == 0) begin
      failures++;
      $display("FAIL the chip-ID salt never changes the pattern");
    end
    checks++;
    if (!(dseen[3] && dseen[5] && dseen[6])) begin
      failures++;
      $display("FAIL not all dummy states used");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
