// tb_attack_detector: trips exactly at the LIMIT-th attempt, ignores idle
// cycles, and is cleared by power-up.
module tb_attack_detector;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n, attempt, trip;

  attack_detector #(.LIMIT(100)) dut (.clk(clk), .rst_n(rst_n), .attempt(attempt), .trip(trip));

  always #5 clk = ~clk;
  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int n;
    rst_n = 0; attempt = 0;
    @(posedge clk); #1 rst_n = 1;
    n = 0;
    while (n < 100) begin
      attempt = 1'($urandom);
      checks++;
      if (trip) begin
        failures++;
        $display("FAIL early trip at %0d", n);
      end
      @(posedge clk); #1;
      n += int'(attempt);
    end
    attempt = 0;
    checks++;
    if (!trip) begin failures++; $display("FAIL no trip at limit"); end
    repeat (5) @(posedge clk);
    #1 checks++;
    if (!trip) begin failures++; $display("FAIL trip not held"); end
    rst_n = 0; #1 rst_n = 1;
    checks++;
    if (trip) begin failures++; $display("FAIL power-up did not clear"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
