// key_store: programmable on-chip store of the unlocking data.
//
// Holds the key (the input sequence that takes this IC's power-up state to the
// reset state, up to KEY_MAX words of IN_W bits), the key length, an optional
// saved copy of the power-up RUB value that the boosted FSM loads instead of
// the live ID (so that later drift of unstable ID bits does not invalidate the
// key), and the permanent-disable record. It stands for a small non-volatile
// memory; here it is plain registers, and `clr` is a factory erase. Writes
// take effect on the next clock edge; the key read port is combinational.
module key_store #(
  parameter int unsigned KEY_MAX = 32,
  parameter int unsigned IN_W    = 3,
  parameter int unsigned RUB_W   = 20,
  localparam int unsigned KAW = $clog2(KEY_MAX),
  localparam int unsigned KLW = $clog2(KEY_MAX + 1)
) (
  input  logic             clk,
  input  logic             clr,
  input  logic             we_key,
  input  logic [KAW-1:0]   waddr,
  input  logic [IN_W-1:0]  wdata,
  input  logic             we_len,
  input  logic [KLW-1:0]   wlen,
  input  logic             we_rub,
  input  logic [RUB_W-1:0] wrub,
  input  logic             set_sticky,
  input  logic [KAW-1:0]   raddr,
  output logic [IN_W-1:0]  rdata,
  output logic [KLW-1:0]   key_len,
  output logic             rub_valid,
  output logic [RUB_W-1:0] rub_saved,
  output logic             sticky
);
  logic [IN_W-1:0] key_mem [KEY_MAX];

  always_ff @(posedge clk) begin
    if (we_key) key_mem[waddr] <= wdata;
  end

  always_ff @(posedge clk) begin
    if (clr) begin
      key_len   <= '0;
      rub_valid <= 1'b0;
      rub_saved <= '0;
      sticky    <= 1'b0;
    end else begin
      if (we_len) key_len <= (wlen > KLW'(KEY_MAX)) ? KLW'(KEY_MAX) : wlen;
      if (we_rub) begin
        rub_valid <= 1'b1;
        rub_saved <= wrub;
      end
      if (set_sticky) sticky <= 1'b1;
    end
  end

  assign rdata = key_mem[raddr];
endmodule
