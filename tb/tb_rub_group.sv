// tb_rub_group: exhaustive check of the RUB group classifier, and of its
// tolerance to any single flipped bit in each vote triple.
module tb_rub_group;
  int checks = 0, failures = 0;
  logic [5:0] rb;
  logic [1:0] g;

  rub_group dut (.rub_bits(rb), .group(g));

  function automatic int ref_group(int v);
    int lo, hi, c;
    lo = (($countones(v & 7)) >= 2) ? 1 : 0;
    hi = (($countones((v >> 3) & 7)) >= 2) ? 1 : 0;
    c  = hi * 2 + lo;
    return (c == 3) ? 0 : c;
  endfunction

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int base;
    for (int v = 0; v < 64; v++) begin
      rb = 6'(v);
      #1;
      checks++;
      if (int'(g) != ref_group(v)) begin
        failures++;
        $display("FAIL %b -> %0d", rb, g);
      end
    end
    // clean patterns (all three votes equal) stay in their group under one flip per triple
    for (int c = 0; c < 4; c++) begin
      base = ((c & 1) ? 7 : 0) | ((c & 2) ? 56 : 0);
      for (int f0 = 0; f0 < 3; f0++)
        for (int f1 = 3; f1 < 6; f1++) begin
          rb = 6'(base ^ (1 << f0) ^ (1 << f1));
          #1;
          checks++;
          if (int'(g) != ((c == 3) ? 0 : c)) begin
            failures++;
            $display("FAIL tolerance c=%0d", c);
          end
        end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
