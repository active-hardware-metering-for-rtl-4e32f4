// tb_rub: behaviour of the random-ID model. The same die gives nearly the
// same ID at every evaluation (at most a few unstable bits), two dies give
// clearly different IDs, and across many dies about 4 % of the bits are
// unstable and the stable bits are balanced between 0 and 1.
module tb_rub;
  localparam int K = 26, DIES = 40;
  int checks = 0, failures = 0;
  logic eval = 1;
  logic [K-1:0] id [DIES];
  logic [K-1:0] first [DIES];
  logic [K-1:0] flips [DIES];

  for (genvar d = 0; d < DIES; d++) begin : g_die
    rub #(.K(K), .SEED(d + 1)) u_rub (.eval(eval), .id(id[d]));
  end

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int unstable = 0, ones = 0, hd, mind = K;
    foreach (flips[d]) flips[d] = '0;
    for (int e = 0; e < 20; e++) begin
      eval = 1; #5;
      eval = 0; #5;
      foreach (id[d]) begin
        if (e == 0) first[d] = id[d];
        else flips[d] |= id[d] ^ first[d];
      end
    end
    foreach (id[d]) begin
      unstable += $countones(flips[d]);
      ones += $countones(first[d] & ~flips[d]);
      checks++;
      if ($countones(flips[d]) > 4) begin
        failures++;
        $display("FAIL die %0d has %0d unstable bits", d, $countones(flips[d]));
      end
      for (int d2 = 0; d2 < d; d2++) begin
        hd = $countones((first[d] ^ first[d2]) & ~flips[d] & ~flips[d2]);
        if (hd < mind) mind = hd;
      end
    end
    $display("unstable bits %0d of %0d, stable ones %0d, minimum distance %0d", unstable, K * DIES, ones, mind);
    checks++;
    if (unstable == 0 || unstable > K * DIES / 10) begin failures++; $display("FAIL unstable fraction"); end
    checks++;
    if (ones < (K * DIES - unstable) * 35 / 100 || ones > (K * DIES - unstable) * 65 / 100) begin
      failures++; $display("FAIL bias");
    end
    checks++;
    if (mind < 1) begin failures++; $display("FAIL two dies share an ID"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
