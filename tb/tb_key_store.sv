// tb_key_store: programming and reading back a key, clamping of the length,
// the saved ID, the permanent record and the factory erase.
module tb_key_store;
  int checks = 0, failures = 0;
  logic clk = 0, clr, we_key, we_len, we_rub, set_sticky, rub_valid, sticky;
  logic [4:0] waddr, raddr;
  logic [2:0] wdata, rdata;
  logic [5:0] wlen, key_len;
  logic [19:0] wrub, rub_saved;
  logic [2:0] ref_key [32];

  key_store #(.KEY_MAX(32), .IN_W(3), .RUB_W(20)) dut (
    .clk(clk), .clr(clr), .we_key(we_key), .waddr(waddr), .wdata(wdata), .we_len(we_len), .wlen(wlen),
    .we_rub(we_rub), .wrub(wrub), .set_sticky(set_sticky), .raddr(raddr), .rdata(rdata),
    .key_len(key_len), .rub_valid(rub_valid), .rub_saved(rub_saved), .sticky(sticky));

  always #5 clk = ~clk;
  initial begin
    repeat (1000) @(posedge clk);
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
    clr = 1; we_key = 0; we_len = 0; we_rub = 0; set_sticky = 0; waddr = 0; wdata = 0; wlen = 0; wrub = 0; raddr = 0;
    @(posedge clk); #1 clr = 0;
    check(key_len == 0 && !rub_valid && !sticky, "erased");
    for (int i = 0; i < 32; i++) begin
      ref_key[i] = 3'($urandom);
      we_key = 1; waddr = 5'(i); wdata = ref_key[i];
      @(posedge clk); #1;
    end
    we_key = 0;
    for (int i = 0; i < 32; i++) begin
      raddr = 5'(31 - i);
      #1 check(rdata == ref_key[31 - i], $sformatf("key word %0d", 31 - i));
    end
    we_len = 1; wlen = 6'd17; @(posedge clk); #1;
    check(key_len == 17, "length");
    wlen = 6'd40; @(posedge clk); #1;
    check(key_len == 32, "length clamped to KEY_MAX");
    we_len = 0; we_rub = 1; wrub = 20'hABCDE; @(posedge clk); #1;
    we_rub = 0;
    check(rub_valid && rub_saved == 20'hABCDE, "saved ID");
    set_sticky = 1; @(posedge clk); #1 set_sticky = 0;
    check(sticky, "permanent record");
    clr = 1; @(posedge clk); #1 clr = 0;
    check(key_len == 0 && !rub_valid && !sticky, "erase again");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
