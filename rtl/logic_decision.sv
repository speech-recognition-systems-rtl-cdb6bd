// logic_decision: decision logic at the end of the recognition of a word. When
// eval is pulsed it compares the final scores of all HMM blocks, registers the
// index and score of the highest one (lowest index wins a tie) and whether
// that score reaches the reference value thr (recognized). valid is high for
// one cycle, the cycle after eval. Choosing the highest score and comparing it
// with a reference follow the paper; the tie rule and the >= comparison
// are this design's choice.
module logic_decision
  import srs_pkg::*;
#(
  parameter int unsigned NW  = WORDS,
  parameter int unsigned W   = SCORE_W,
  parameter int unsigned IW  = (NW > 1) ? $clog2(NW) : 1
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          eval,
  input  logic [W-1:0]  scores [NW],
  input  logic [W-1:0]  thr,
  output logic          valid,
  output logic [IW-1:0] word,
  output logic [W-1:0]  best,
  output logic          recognized
);

  logic [IW-1:0] bi;
  logic [W-1:0]  bs;

  always_comb begin
    bi = '0;
    bs = scores[0];
    for (int unsigned i = 1; i < NW; i++) begin
      if (scores[i] > bs) begin
        bs = scores[i];
        bi = IW'(i);
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      valid      <= 1'b0;
      word       <= '0;
      best       <= '0;
      recognized <= 1'b0;
    end else begin
      valid <= eval;
      if (eval) begin
        word       <= bi;
        best       <= bs;
        recognized <= (bs >= thr);
      end
    end
  end

endmodule
