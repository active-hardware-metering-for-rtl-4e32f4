// tb_key_sequencer: phase timing after power-up (evaluation strobe, load,
// key_len play cycles with the stored words in order, then run) for several
// key lengths, including an empty key.
module tb_key_sequencer;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n, rub_eval, load, play, done;
  logic [5:0] key_len;
  logic [4:0] key_addr;
  logic [2:0] key_word, x_key;
  logic [2:0] mem [32];

  key_sequencer #(.KEY_MAX(32), .IN_W(3)) dut (
    .clk(clk), .rst_n(rst_n), .key_len(key_len), .key_word(key_word), .key_addr(key_addr),
    .rub_eval(rub_eval), .load(load), .play(play), .x_key(x_key), .done(done));

  assign key_word = mem[key_addr];
  always #5 clk = ~clk;
  initial begin
    repeat (2000) @(posedge clk);
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
    int lens [4] = '{0, 1, 11, 32};
    foreach (mem[i]) mem[i] = 3'($urandom);
    foreach (lens[k]) begin
      int plays;
      key_len = 6'(lens[k]);
      rst_n = 0;
      #1 check(rub_eval && !load && !play, "strobe high while off");
      @(posedge clk); #1 rst_n = 1;
      check(rub_eval && !load, "EVAL cycle");
      @(posedge clk); #1;
      check(!rub_eval && load && !play && !done, "LOAD cycle");
      @(posedge clk); #1;
      plays = 0;
      while (play) begin
        check(x_key == mem[plays], $sformatf("key word %0d", plays));
        plays++;
        @(posedge clk); #1;
      end
      check(plays == lens[k], $sformatf("played %0d of %0d", plays, lens[k]));
      check(done && !load, "RUN");
      repeat (3) @(posedge clk);
      #1 check(done, "RUN holds");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
