// vac: Viterbi Algorithm Controller. It sequences the whole recognition
// hardware and decides, word model by word model, whether Subsystem-II sees
// the incoming code labels or the generated ones.
//
// Sequencing (one observation per 3 cycles):
//   IDLE  obs_ready=1. An accepted label (obs_valid) issues step to every HMM
//         block of both subsystems and to every generator, in the same cycle.
//   MAC   the HMM blocks add and shift (accumulators written at the edge).
//   EVAL  new Subsystem-I scores are visible. The enables are updated for the
//         next label; for the last label of a word (obs_last) decide is
//         pulsed to the logic decision block.
// bist_req is taken in IDLE when no label is offered: bist_start is pulsed and
// obs_ready stays low until bist_busy falls (recognition pauses for the test).
// Periodic test: with bist_every = N > 0, a run is started by itself after
// every N decided words, before the first label of the next word is taken
// (that label waits with obs_ready low).
//
// Reconstruction: the input is taken to be buried in noise when, with
// recon_en=1 and at least WARMUP labels of the current word scored, even the
// highest Subsystem-I score is below thr: no word model recognizes the
// segment as speech. The controller then selects the model of the leading
// word (highest Subsystem-I score, lowest index on a tie) and sets its
// Enable(n) (enable is one-hot) for HOLD labels: the 2x1 MUX chain puts
// generator n's labels on the Subsystem-II input instead of the incoming
// labels, and afterwards falls back to the input. The first label of a word
// clears the enables.
//
// Switching when the Subsystem-I probability drops below a predefined
// threshold, for a predefined period, and then bouncing back, and a generator
// bounded by the model the controller selects, follow the paper. Using the
// highest score as the noise test and the leading word as the selected model,
// the 3-cycle schedule, WARMUP and the default HOLD are this design's choice.
// Periodic BIST runs follow the paper; counting them in words is this
// design's choice.
// The paper's controller also generates the common clock; here it issues
// a common step strobe (clock enable) instead. first is obs_first handed on
// with step as the common start-of-word marker (it restarts the HMM
// accumulators and keeps the MUX chain on the input), so it is a plain copy.
module vac
  import srs_pkg::*;
#(
  parameter int unsigned NW     = WORDS,
  parameter int unsigned W      = SCORE_W,
  parameter int unsigned HOLD   = 5,
  parameter int unsigned WARMUP = STATES,
  parameter int unsigned CW     = 8
) (
  input  logic          clk,
  input  logic          rst_n,
  // observation stream from the signal analysis part
  input  logic          obs_valid,
  input  logic          obs_first,
  input  logic          obs_last,
  output logic          obs_ready,
  // configuration
  input  logic          recon_en,
  input  logic [W-1:0]  thr,
  // Subsystem-I scores
  input  logic [W-1:0]  scores_i [NW],
  // control outputs
  output logic          step,
  output logic          first,
  output logic          restart,
  output logic [NW-1:0] enable,
  output logic          decide,
  // BIST
  input  logic          bist_req,
  input  logic [7:0]    bist_every,  // words between automatic BIST runs, 0: off
  input  logic          bist_busy,
  output logic          bist_start,
  // statistics
  output logic [15:0]   switch_cnt   // switches to a generator
);

  typedef enum logic [1:0] {S_IDLE, S_MAC, S_EVAL, S_BIST} st_e;
  st_e st;

  localparam int unsigned IW = (NW > 1) ? $clog2(NW) : 1;

  logic [CW-1:0] hold;           // labels left in the current switch period
  logic [CW-1:0] nlab;           // labels scored in the current word
  logic          last_q;
  logic [IW-1:0] lead;           // word with the highest Subsystem-I score
  logic [W-1:0]  lead_score;
  logic          trig;           // noise detected in this EVAL
  logic [7:0]    word_cnt;       // words decided since the last BIST run
  logic          auto_req;       // periodic BIST due

  always_comb begin
    lead       = '0;
    lead_score = scores_i[0];
    for (int unsigned n = 1; n < NW; n++) begin
      if (scores_i[n] > lead_score) begin
        lead       = IW'(n);
        lead_score = scores_i[n];
      end
    end
    trig = (st == S_EVAL) && (hold == '0) && recon_en &&
           (nlab >= CW'(WARMUP)) && (lead_score < thr);
  end

  assign obs_ready  = (st == S_IDLE) && !bist_busy && !(auto_req && obs_first);
  assign step       = obs_ready && obs_valid;
  assign first      = obs_first;
  assign restart    = step && obs_last;
  assign auto_req   = (bist_every != '0) && (word_cnt >= bist_every);
  // a periodic run is due: it goes ahead of the next word, not between labels
  assign bist_start = (st == S_IDLE) && !bist_busy &&
                      ((bist_req && !obs_valid) || (auto_req && (!obs_valid || obs_first)));
  assign decide     = (st == S_EVAL) && last_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st         <= S_IDLE;
      enable     <= '0;
      hold       <= '0;
      nlab       <= '0;
      last_q     <= 1'b0;
      switch_cnt <= '0;
      word_cnt   <= '0;
    end else begin
      if (bist_start)  word_cnt <= '0;
      else if (decide && (word_cnt != '1)) word_cnt <= word_cnt + 1'b1;
      unique case (st)
        S_IDLE: begin
          if (step) begin
            st     <= S_MAC;
            last_q <= obs_last;
            if (obs_first) begin
              nlab   <= CW'(1);
              enable <= '0;
              hold   <= '0;
            end else if (nlab != '1) begin
              nlab <= nlab + 1'b1;
            end
          end else if (bist_start) begin
            st <= S_BIST;
          end
        end
        S_MAC:  st <= S_EVAL;
        S_EVAL: begin
          st <= S_IDLE;
          if (hold != '0) begin
            hold <= hold - 1'b1;
            if (hold == CW'(1)) enable <= '0;
          end else if (trig) begin
            hold       <= CW'(HOLD);
            enable     <= NW'(1) << lead;
            switch_cnt <= switch_cnt + 1'b1;
          end
        end
        S_BIST: if (!bist_busy) st <= S_IDLE;
        default: st <= S_IDLE;
      endcase
    end
  end

  enable_onehot: assert property (@(posedge clk) disable iff (!rst_n)
    (enable & (enable - 1'b1)) == '0);
  obs_stable: assert property (@(posedge clk) disable iff (!rst_n)
    obs_valid && !obs_ready |=> obs_valid);

endmodule
