// hmm_subsystem: a bank of NW HMM blocks, one per vocabulary word, working in
// lock-step on a common step strobe. Block n reads its own label input
// label[n] (Subsystem-I ties all of them to the incoming labels; Subsystem-II
// gets each word's MUX output). The host load port writes the trained scores
// of word host_word; the BIST bundle reaches every cache memory, and
// bist_fail is the OR of all lanes. Timing is that of hmm_block (two cycles
// per label). One HMM block per word follows the paper.
module hmm_subsystem
  import srs_pkg::*;
#(
  parameter int unsigned NW    = WORDS,
  parameter int unsigned NS    = STATES,
  parameter int unsigned DEPTH = CB_DEPTH,
  parameter int unsigned W     = SCORE_W,
  parameter int unsigned AW    = $clog2(DEPTH),
  parameter int unsigned SIW   = (NS > 1) ? $clog2(NS) : 1,
  parameter int unsigned WIW   = (NW > 1) ? $clog2(NW) : 1
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           ccc_en,
  input  logic           step,
  input  logic           first,
  input  logic [AW-1:0]  label [NW],
  output logic [W-1:0]   scores [NW],
  output logic [NW-1:0]  ovf,
  input  logic           host_we,
  input  logic [WIW-1:0] host_word,
  input  logic [SIW-1:0] host_state,
  input  logic [AW-1:0]  host_addr,
  input  logic [W-1:0]   host_wdata,
  input  bist_ctl_t      bist,
  input  logic [AW-1:0]  bist_addr,
  output logic           bist_fail
);

  logic [NW-1:0] fail;
  assign bist_fail = |fail;

  for (genvar n = 0; n < NW; n++) begin : g_word
    hmm_block #(.NS(NS), .DEPTH(DEPTH), .W(W), .SGW(MISR_W)) u_hmm (
      .clk        (clk),
      .rst_n      (rst_n),
      .ccc_en     (ccc_en),
      .step       (step),
      .first      (first),
      .label      (label[n]),
      .busy       (),
      .done       (),
      .score      (scores[n]),
      .acc_o      (),
      .ovf        (ovf[n]),
      .host_we    (host_we && (host_word == WIW'(n))),
      .host_state (host_state),
      .host_addr  (host_addr),
      .host_wdata (host_wdata),
      .bist       (bist),
      .bist_addr  (bist_addr),
      .bist_fail  (fail[n])
    );
  end

endmodule
