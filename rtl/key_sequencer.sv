// key_sequencer: power-up and unlock controller.
//
// While rst_n is low (power off) and for one cycle after (EVAL) it holds the
// RUB evaluation strobe high; the strobe falls when the controller enters
// LOAD, the ID latches resolve, and in LOAD the boosted FSM takes the ID. In
// PLAY it reads the stored key one word per cycle (key_addr) and drives it as
// the FSM input with play=1, then stays in RUN with done=1 and hands the
// inputs to the user. An empty key goes straight to RUN. Phase lengths are
// this design's choice: power-up to RUN takes 2 + key_len cycles.
module key_sequencer #(
  parameter int unsigned KEY_MAX = 32,
  parameter int unsigned IN_W    = 3,
  localparam int unsigned KAW = $clog2(KEY_MAX),
  localparam int unsigned KLW = $clog2(KEY_MAX + 1)
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic [KLW-1:0]  key_len,
  input  logic [IN_W-1:0] key_word,
  output logic [KAW-1:0]  key_addr,
  output logic            rub_eval,
  output logic            load,
  output logic            play,
  output logic [IN_W-1:0] x_key,
  output logic            done
);
  typedef enum logic [1:0] {EVAL, LOAD, PLAY, RUN} phase_e;
  phase_e          phase;
  logic [KLW-1:0]  cnt;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      phase <= EVAL;
      cnt   <= '0;
    end else begin
      unique case (phase)
        EVAL: phase <= LOAD;
        LOAD: begin
          cnt   <= '0;
          phase <= (key_len == '0) ? RUN : PLAY;
        end
        PLAY: begin
          cnt <= cnt + 1'b1;
          if (cnt + 1'b1 >= key_len) phase <= RUN;
        end
        RUN: ;
      endcase
    end
  end

  assign rub_eval = !rst_n || (phase == EVAL);
  assign load     = (phase == LOAD);
  assign play     = (phase == PLAY);
  assign done     = (phase == RUN);
  assign key_addr = KAW'(cnt);
  assign x_key    = key_word;
endmodule
