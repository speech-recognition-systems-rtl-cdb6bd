// srs_top: hardware part of a speech recognition system, the fault-tolerant
// pattern matching & logic decision block with on-line speech signal
// reconstruction. The signal analysis part (sampling, filtering, windowing,
// LPC/cepstral analysis and vector quantization) runs in software and
// delivers a stream of code labels (observations) on obs_*.
//
//   obs_label ──┬─────────────────► Subsystem-I (NW HMM blocks) ──► scores_i
//               │                                       │
//               │   generators G0..G(NW-1)      vac ◄───┘  (noise test,
//               │        │                       │          model select)
//               └──► MUX 2x1 chain ◄── Enable(n) ┘
//                        │  (Enable(n)=1: generator n replaces the input)
//                        └──► Subsystem-II (NW HMM blocks) ──► logic_decision
//
// Every HMM accumulator goes through the concurrent consistency check (1-bit
// right shift after each add) when ccc_en=1. One transparent BIST controller
// tests all 2*NW*NS cache memories in parallel on bist_req, while recognition
// pauses, and leaves their contents unchanged.
//
// Interface:
//   obs_valid/obs_ready handshake; obs_first and obs_last mark a word's first
//     and last label. A label is taken every 3 cycles at most.
//   host_*: writes one trained score byte (word, state, label) into the cache
//     memories of both subsystems; gen_*: loads the generators' label sets and
//     stay thresholds. Load only while no label is in flight and no BIST runs.
//   result_*: result_valid is high for one cycle, 3 cycles after the cycle in
//     which the last label of a word is taken; a word of L labels offered
//     back to back takes 3L cycles from its first label to its result.
//   bist_*: a run starts on bist_req (between labels) or by itself after every
//     bist_every words (0: off); bist_done pulses at the end of a run,
//     bist_pass holds its verdict.
// The structure (two subsystems, generators, 2x1 MUXes, controller, decision,
// CCC, transparent BIST of the cache memories) follows the paper; widths,
// handshakes and timing are this design's choices.
module srs_top
  import srs_pkg::*;
#(
  parameter int unsigned NW     = WORDS,
  parameter int unsigned NS     = STATES,
  parameter int unsigned DEPTH  = CB_DEPTH,
  parameter int unsigned W      = SCORE_W,
  parameter int unsigned NT     = 8,
  parameter int unsigned HOLD   = 5,
  parameter int unsigned AW     = $clog2(DEPTH),
  parameter int unsigned SIW    = (NS > 1) ? $clog2(NS) : 1,
  parameter int unsigned WIW    = (NW > 1) ? $clog2(NW) : 1,
  parameter int unsigned TIW    = (NT > 1) ? $clog2(NT) : 1
) (
  input  logic           clk,
  input  logic           rst_n,
  // observation stream
  input  logic           obs_valid,
  input  logic [AW-1:0]  obs_label,
  input  logic           obs_first,
  input  logic           obs_last,
  output logic           obs_ready,
  // configuration
  input  logic           ccc_en,
  input  logic           recon_en,
  input  logic [W-1:0]   recon_thr,
  input  logic [W-1:0]   decide_thr,
  input  logic           host_we,
  input  logic [WIW-1:0] host_word,
  input  logic [SIW-1:0] host_state,
  input  logic [AW-1:0]  host_addr,
  input  logic [W-1:0]   host_wdata,
  input  logic           gen_tbl_we,
  input  logic           gen_stay_we,
  input  logic [WIW-1:0] gen_word,
  input  logic [SIW-1:0] gen_state,
  input  logic [TIW-1:0] gen_idx,
  input  logic [AW-1:0]  gen_label,
  input  logic [7:0]     gen_stay,
  // results
  output logic           result_valid,
  output logic [WIW-1:0] result_word,
  output logic [W-1:0]   result_score,
  output logic           result_recognized,
  output logic [W-1:0]   scores_i [NW],
  output logic [W-1:0]   scores_ii [NW],
  output logic [NW-1:0]  enable,
  output logic [15:0]    switch_cnt,
  output logic           ovf,
  // transparent BIST
  input  logic           bist_req,
  input  logic [7:0]     bist_every,
  output logic           bist_busy,
  output logic           bist_done,
  output logic           bist_pass
);

  logic          step, first, restart, decide, bist_start;
  logic [AW-1:0] lab_i  [NW];
  logic [AW-1:0] lab_ii [NW];
  logic [AW-1:0] glab   [NW];
  logic [AW-1:0] chain  [NW+1];   // 2x1 MUX chain, chain[NW] = reconstructed labels
  logic [NW-1:0] ovf_i, ovf_ii;
  logic          fail_i, fail_ii;
  bist_ctl_t     bctl;
  logic [AW-1:0] baddr;

  vac #(.NW(NW), .W(W), .HOLD(HOLD), .WARMUP(NS)) u_vac (
    .clk        (clk),
    .rst_n      (rst_n),
    .obs_valid  (obs_valid),
    .obs_first  (obs_first),
    .obs_last   (obs_last),
    .obs_ready  (obs_ready),
    .recon_en   (recon_en),
    .thr        (recon_thr),
    .scores_i   (scores_i),
    .step       (step),
    .first      (first),
    .restart    (restart),
    .enable     (enable),
    .decide     (decide),
    .bist_req   (bist_req),
    .bist_every (bist_every),
    .bist_busy  (bist_busy),
    .bist_start (bist_start),
    .switch_cnt (switch_cnt)
  );

  // Generators Subsystem and the 2x1 MUXes in front of Subsystem-II
  for (genvar n = 0; n < NW; n++) begin : g_gen
    label_generator #(.NS(NS), .LW(AW), .NT(NT),
                      .SEED(16'hACE1 ^ 16'(n * 16'h1F35))) u_gen (
      .clk         (clk),
      .rst_n       (rst_n),
      .step        (step),
      .restart     (restart),
      .label       (glab[n]),
      .state       (),
      .cfg_tbl_we  (gen_tbl_we && (gen_word == WIW'(n))),
      .cfg_stay_we (gen_stay_we && (gen_word == WIW'(n))),
      .cfg_state   (gen_state),
      .cfg_idx     (gen_idx),
      .cfg_label   (gen_label),
      .cfg_stay    (gen_stay)
    );
    assign lab_i[n]  = obs_label;
    // 2x1 MUX n: Enable(n) puts generator n on the reconstructed stream
    assign chain[n+1] = (enable[n] && !first) ? glab[n] : chain[n];
    assign lab_ii[n]  = chain[NW];
  end
  assign chain[0] = obs_label;

  hmm_subsystem #(.NW(NW), .NS(NS), .DEPTH(DEPTH), .W(W)) u_sub_i (
    .clk        (clk),
    .rst_n      (rst_n),
    .ccc_en     (ccc_en),
    .step       (step),
    .first      (first),
    .label      (lab_i),
    .scores     (scores_i),
    .ovf        (ovf_i),
    .host_we    (host_we),
    .host_word  (host_word),
    .host_state (host_state),
    .host_addr  (host_addr),
    .host_wdata (host_wdata),
    .bist       (bctl),
    .bist_addr  (baddr),
    .bist_fail  (fail_i)
  );

  hmm_subsystem #(.NW(NW), .NS(NS), .DEPTH(DEPTH), .W(W)) u_sub_ii (
    .clk        (clk),
    .rst_n      (rst_n),
    .ccc_en     (ccc_en),
    .step       (step),
    .first      (first),
    .label      (lab_ii),
    .scores     (scores_ii),
    .ovf        (ovf_ii),
    .host_we    (host_we),
    .host_word  (host_word),
    .host_state (host_state),
    .host_addr  (host_addr),
    .host_wdata (host_wdata),
    .bist       (bctl),
    .bist_addr  (baddr),
    .bist_fail  (fail_ii)
  );

  assign ovf = |{ovf_i, ovf_ii};

  logic_decision #(.NW(NW), .W(W)) u_dec (
    .clk        (clk),
    .rst_n      (rst_n),
    .eval       (decide),
    .scores     (scores_ii),
    .thr        (decide_thr),
    .valid      (result_valid),
    .word       (result_word),
    .best       (result_score),
    .recognized (result_recognized)
  );

  tbist_ctrl #(.DEPTH(DEPTH)) u_bist (
    .clk   (clk),
    .rst_n (rst_n),
    .start (bist_start),
    .busy  (bist_busy),
    .done  (bist_done),
    .addr  (baddr),
    .ctl   (bctl)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)         bist_pass <= 1'b0;
    else if (bist_done) bist_pass <= !(fail_i || fail_ii);
  end

endmodule
