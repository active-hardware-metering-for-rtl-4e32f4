// attack_detector: brute-force attack detector.
//
// Counts the inputs a user applies while the IC is still locked. When the
// count reaches LIMIT it raises `trip`, which the top feeds into the remote
// disable path so the IC falls into the black hole (and, with the permanent
// record, stays there across power cycles). The counter saturates and is
// cleared only by power-up (rst_n low). The limit is this design's choice; it
// should be far above any legitimate key length.
module attack_detector #(
  parameter int unsigned LIMIT = 4096,
  localparam int unsigned CW = $clog2(LIMIT + 1)
) (
  input  logic clk,
  input  logic rst_n,
  input  logic attempt,  // one user input while locked
  output logic trip
);
  logic [CW-1:0] cnt;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                          cnt <= '0;
    else if (attempt && cnt < CW'(LIMIT)) cnt <= cnt + 1'b1;
  end

  assign trip = (cnt >= CW'(LIMIT));
endmodule
