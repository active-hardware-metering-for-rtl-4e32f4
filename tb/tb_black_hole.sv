// tb_black_hole: entry, no exit under any input, cycling through the states,
// the power-up guard, the permanent record, and the trapdoor variant that a
// secret input sequence opens.
module tb_black_hole;
  int checks = 0, failures = 0;
  logic clk = 0, powerup, sticky, enter, active;
  logic [1:0] h;
  logic [2:0] x;
  logic xv, esc;
  logic t_enter, t_active, t_esc;
  logic t_h;

  black_hole #(.BH_STATES(4), .PERMANENT(1'b1)) dut (
    .clk(clk), .powerup(powerup), .sticky(sticky), .enter(enter), .x(x), .x_valid(xv),
    .active(active), .escape(esc), .h(h));

  // trapdoor hole left by the sequence 3, 6, 6, 1
  black_hole #(.BH_STATES(2), .PERMANENT(1'b0), .IN_W(3), .TD_LEN(4), .TD_SEQ(128'h01_06_06_03)) td (
    .clk(clk), .powerup(powerup), .sticky(1'b0), .enter(t_enter), .x(x), .x_valid(xv),
    .active(t_active), .escape(t_esc), .h(t_h));

  always #5 clk = ~clk;
  initial begin
    repeat (500) @(posedge clk);
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

  initial begin
    x = 0; xv = 0; t_enter = 0;
    powerup = 1; sticky = 0; enter = 1;      // power-up wins over an entry request
    @(posedge clk); #1;
    check(!active, "power-up starts outside");
    powerup = 0; enter = 0;
    repeat (5) @(posedge clk);
    #1 check(!active, "stays outside without entry");
    enter = 1;
    @(posedge clk); #1;
    enter = 0;
    check(active && h == 0, "entered at h1");
    xv = 1;
    for (int i = 1; i <= 9; i++) begin
      x = 3'($urandom);
      @(posedge clk); #1;
      check(active && !esc && int'(h) == i % 4, $sformatf("cycle step %0d, no exit", i));
    end
    xv = 0;
    powerup = 1; sticky = 0;
    @(posedge clk); #1;
    check(!active, "power-up clears a non-permanent black hole");
    powerup = 0; enter = 1;
    @(posedge clk); #1;
    enter = 0; powerup = 1; sticky = 1;
    @(posedge clk); #1;
    check(active && h == 0, "permanent record keeps it disabled after power-up");
    powerup = 0;
    // trapdoor: wrong sequences keep it closed, the right one (after a false start) opens it
    @(posedge clk); #1;
    t_enter = 1;
    @(posedge clk); #1;
    t_enter = 0;
    check(t_active, "trapdoor hole entered");
    begin
      logic [2:0] seq [9] = '{3'd3, 3'd6, 3'd1, 3'd3, 3'd3, 3'd6, 3'd6, 3'd1, 3'd0};
      for (int i = 0; i < 8; i++) begin
        x = seq[i]; xv = 1;
        #1 check(t_esc == (i == 7), $sformatf("escape only on the last word (%0d)", i));
        @(posedge clk); #1;
        check(t_active == (i < 7), $sformatf("trapdoor state after word %0d", i));
        if (i == 4) begin                     // an idle cycle does not break the match
          xv = 0;
          @(posedge clk); #1;
        end
      end
      xv = 0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
