// tb_scan_readout: a captured value comes out LSB first, one bit per shift,
// while the observed state keeps changing underneath.
module tb_scan_readout;
  int checks = 0, failures = 0;
  logic clk = 0, capture, shift, so;
  logic [20:0] state, snap;

  scan_readout #(.W(21)) dut (.clk(clk), .capture(capture), .shift(shift), .state(state), .so(so));

  always #5 clk = ~clk;
  always @(posedge clk) state <= 21'($urandom);
  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    capture = 0; shift = 0;
    for (int r = 0; r < 5; r++) begin
      @(negedge clk);
      capture = 1; snap = state;
      @(negedge clk);
      capture = 0; shift = 1;
      for (int i = 0; i < 21; i++) begin
        checks++;
        if (so !== snap[i]) begin
          failures++;
          $display("FAIL bit %0d", i);
        end
        @(negedge clk);
        if (i % 5 == 4) begin        // pauses hold the shadow value
          shift = 0;
          @(negedge clk);
          shift = 1;
        end
      end
      shift = 0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
