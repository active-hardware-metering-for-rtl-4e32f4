// black_hole: one black-hole sub-FSM of the boosted FSM.
//
// A black hole is a group of states with no edge back to the rest of the
// graph. Once `enter` is seen the block is active and steps h1, h2, ...
// cyclically through BH_STATES states whatever the input; nothing but a
// power-up load clears it. A power-up load always starts outside the black
// hole, so an IC can never power up trapped, unless PERMANENT is set and the
// permanent-disable record (`sticky`, kept in the key store) says the IC was
// disabled before, in which case it powers up inside it again.
//
// With TD_LEN > 0 the block is a trapdoor ("gray") hole instead: while it is
// active, the TD_LEN-word input sequence TD_SEQ (word k in bits [8k +: IN_W])
// applied on consecutive valid inputs raises `escape` for one cycle and
// leaves the hole; the boosted FSM then goes to the functional reset state. A
// wrong word restarts the match. The default is a true black hole.
//
// The two-state default follows the evaluated black-hole size; the permanent
// record, the state order and the trapdoor matcher are this design's choices.
// One clock per state; `enter` takes effect on the next edge.
module black_hole #(
  parameter int unsigned   BH_STATES = 2,
  parameter bit            PERMANENT = 1'b1,
  parameter int unsigned   IN_W      = 3,
  parameter int unsigned   TD_LEN    = 0,
  parameter logic [127:0]  TD_SEQ    = '0,
  localparam int unsigned HW = (BH_STATES > 1) ? $clog2(BH_STATES) : 1
) (
  input  logic            clk,
  input  logic            powerup,  // power-up load of the boosted FSM
  input  logic            sticky,   // permanent-disable record
  input  logic            enter,    // entry edge taken
  input  logic [IN_W-1:0] x,        // input, used by a trapdoor hole only
  input  logic            x_valid,
  output logic            active,
  output logic            escape,   // trapdoor sequence completed
  output logic [HW-1:0]   h         // 0 = h1
);
  logic [4:0] td_cnt;   // words of TD_SEQ matched so far

  function automatic logic [IN_W-1:0] td_word(logic [4:0] k);
    return TD_SEQ[8*k +: IN_W];
  endfunction

  always_comb begin
    escape = 1'b0;
    if (TD_LEN > 0 && active && !powerup && x_valid)
      escape = (x == td_word(td_cnt)) && (32'(td_cnt) == TD_LEN - 1);
  end

  always_ff @(posedge clk) begin
    if (powerup) begin
      active <= PERMANENT && sticky;
      h      <= '0;
      td_cnt <= '0;
    end else if (active) begin
      h <= (h == HW'(BH_STATES - 1)) ? '0 : h + 1'b1;
      if (escape) begin
        active <= 1'b0;
        td_cnt <= '0;
      end else if (TD_LEN > 0 && x_valid) begin
        if (x == td_word(td_cnt))   td_cnt <= td_cnt + 1'b1;
        else if (x == td_word('0))  td_cnt <= 5'd1;
        else                        td_cnt <= '0;
      end
    end else if (enter) begin
      active <= 1'b1;
      h      <= '0;
      td_cnt <= '0;
    end
  end

  initial assert (TD_LEN <= 16 && IN_W <= 8) else $error("trapdoor sequence holds at most 16 words of 8 bits");
endmodule
