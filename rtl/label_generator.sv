// label_generator: one generator of the Generators Subsystem. It runs a
// random left-to-right Markov process over the NS states of one word's model
// and emits, for every step, a code label drawn from that state's label set,
// so the generated sequence has the statistics the word model expects.
//   - label holds the current generated label; on step it is consumed and the
//     next one is produced in the same clock edge.
//   - Next label: tbl[state][r] with r taken from a 16-bit LFSR (x^16 + x^14
//     + x^13 + x^11 + 1, Fibonacci, shifted once per step).
//   - Next state: state+1 when another LFSR byte is >= stay[state], else the
//     state is kept; the last state is absorbing. restart (with step) sends
//     the process back to state 0 for the next word.
//   - cfg_* loads the label sets and the stay thresholds (host, idle time).
// The paper gives the function (a random hidden Markov process bounded by
// the word's model); the label tables, the LFSR and the stay thresholds are
// this design's choice of the simplest way to do it.
module label_generator
  import srs_pkg::*;
#(
  parameter int unsigned        NS    = STATES,
  parameter int unsigned        LW    = LABEL_W,
  parameter int unsigned        NT    = 8,         // labels per state
  parameter logic [15:0]        SEED  = 16'hACE1,
  parameter int unsigned        SIW   = (NS > 1) ? $clog2(NS) : 1,
  parameter int unsigned        TIW   = (NT > 1) ? $clog2(NT) : 1
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           step,
  input  logic           restart,
  output logic [LW-1:0]  label,
  output logic [SIW-1:0] state,
  // configuration
  input  logic           cfg_tbl_we,
  input  logic           cfg_stay_we,
  input  logic [SIW-1:0] cfg_state,
  input  logic [TIW-1:0] cfg_idx,
  input  logic [LW-1:0]  cfg_label,
  input  logic [7:0]     cfg_stay
);

  logic [LW-1:0] tbl  [NS][NT];
  logic [7:0]    stay [NS];
  logic [15:0]   lfsr, lfsr_n;
  logic [SIW-1:0] state_n;

  always_comb begin
    lfsr_n = {lfsr[14:0], lfsr[15] ^ lfsr[13] ^ lfsr[12] ^ lfsr[10]};
    if (restart)
      state_n = '0;
    else if ((state != SIW'(NS - 1)) && (lfsr_n[15:8] >= stay[state]))
      state_n = state + 1'b1;
    else
      state_n = state;
  end

  always_ff @(posedge clk) begin
    if (cfg_tbl_we)  tbl[cfg_state][cfg_idx] <= cfg_label;
    if (cfg_stay_we) stay[cfg_state]         <= cfg_stay;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      lfsr  <= SEED;
      state <= '0;
      label <= '0;
    end else if (step) begin
      lfsr  <= lfsr_n;
      state <= state_n;
      label <= tbl[state_n][lfsr_n[TIW-1:0]];
    end else if (cfg_tbl_we && (cfg_state == state) && (cfg_idx == '0)) begin
      label <= cfg_label;   // keep the current label inside the loaded set
    end
  end

endmodule
