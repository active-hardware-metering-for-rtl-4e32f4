// rub_group: error-tolerant classification of the chip ID into one of three
// groups, which selects the chip's replica of the original FSM.
//
// Two group bits are each the majority of three RUB bits, so one flipped bit
// per triple (a temporarily unstable ID bit) does not change the group. The
// two-bit result 3 folds onto group 0, giving the three classes of the
// specialised-FSM scheme. The grouping rule is this design's own choice.
// Combinational.
module rub_group (
  input  logic [5:0] rub_bits,
  output logic [1:0] group
);
  function automatic logic maj3(logic [2:0] v);
    return (v[0] & v[1]) | (v[0] & v[2]) | (v[1] & v[2]);
  endfunction

  logic [1:0] code;
  always_comb begin
    code  = {maj3(rub_bits[5:3]), maj3(rub_bits[2:0])};
    group = (code == 2'd3) ? 2'd0 : code;
  end
endmodule
