// scan_readout: non-destructive read-out of the boosted FSM flip-flops.
//
// `capture` copies the W-bit state into a shadow register; each `shift` cycle
// then moves the shadow one place toward bit 0, and `so` shows the current bit
// 0, so the value comes out least significant bit first, W cycles after the
// capture. The FSM itself is never disturbed. The shadow-register form is
// this design's choice.
module scan_readout #(
  parameter int unsigned W = 21
) (
  input  logic         clk,
  input  logic         capture,
  input  logic         shift,
  input  logic [W-1:0] state,
  output logic         so
);
  logic [W-1:0] shadow;

  always_ff @(posedge clk) begin
    if (capture)    shadow <= state;
    else if (shift) shadow <= {1'b0, shadow[W-1:1]};
  end

  assign so = shadow[0];
endmodule
