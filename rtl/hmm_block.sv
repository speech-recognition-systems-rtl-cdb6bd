// hmm_block: hardware HMM that scores the observation sequence against one
// word (left-to-right model, STATES states), with the concurrent consistency
// check and the transparent-BIST lanes of its cache memories.
//
// Every state s has a local cache memory (cache_mem) indexed by the code
// label, a pre-accumulator, an adder and an accumulator. One observation takes
// two cycles:
//   cycle 1 (step=1): the label addresses all cache memories at once; each
//       pre-accumulator loads the better of the two partial scores that can
//       reach state s, max(acc[s], acc[s-1]) (stay or advance; state 0 can
//       only stay). With first=1 (first label of a word) the pre-accumulators
//       load 0 instead, which restarts the search.
//   cycle 2: acc[s] <= CCC(pre[s] + cache[s][label]) for all states in
//       parallel (ccc_mac), done=1 in the following cycle.
// score is the accumulator of the last state. Scores are unsigned; a larger
// score is a more probable path. step must not be given in the cycle after a
// step (busy=1).
//
// Memory port of each cache memory, by priority: the BIST (bist.active), the
// host load port (host_we: byte host_wdata to state host_state, label
// host_addr), the recognition read. A tbist_lane per memory returns fail.
//
// The adders, pre-accumulators, accumulators, cache memories and the shift
// after every MAC follow the paper; the max() selection between the stay
// and advance paths, the two-cycle schedule and the port priorities are this
// design's choice.
module hmm_block
  import srs_pkg::*;
#(
  parameter int unsigned NS    = 3,
  parameter int unsigned DEPTH = 128,
  parameter int unsigned W     = 8,
  parameter int unsigned AW    = $clog2(DEPTH),
  parameter int unsigned SGW   = 16,
  parameter int unsigned SIW   = (NS > 1) ? $clog2(NS) : 1
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            ccc_en,
  // recognition
  input  logic            step,
  input  logic            first,
  input  logic [AW-1:0]   label,
  output logic            busy,
  output logic            done,
  output logic [W-1:0]    score,
  output logic [W-1:0]    acc_o [NS],
  output logic            ovf,        // sticky: an accumulator wrapped (CCC off)
  // host load of the trained scores
  input  logic            host_we,
  input  logic [SIW-1:0]  host_state,
  input  logic [AW-1:0]   host_addr,
  input  logic [W-1:0]    host_wdata,
  // transparent BIST
  input  bist_ctl_t       bist,
  input  logic [AW-1:0]   bist_addr,
  output logic            bist_fail
);

  logic [W-1:0] pre   [NS];
  logic [W-1:0] acc   [NS];
  logic [W-1:0] rdata [NS];
  logic [W-1:0] bwdata[NS];
  logic [W-1:0] mac   [NS];
  logic [NS-1:0] mac_ovf, lane_fail;
  logic         mac_phase;

  assign busy  = mac_phase;
  assign score = acc[NS-1];
  assign acc_o = acc;
  assign bist_fail = |lane_fail;

  for (genvar s = 0; s < NS; s++) begin : g_state
    logic          m_en, m_we;
    logic [AW-1:0] m_addr;
    logic [W-1:0]  m_wdata;

    always_comb begin
      if (bist.active) begin
        m_en    = bist.mem_en;
        m_we    = bist.mem_we;
        m_addr  = bist_addr;
        m_wdata = bwdata[s];
      end else if (host_we && (host_state == SIW'(s))) begin
        m_en    = 1'b1;
        m_we    = 1'b1;
        m_addr  = host_addr;
        m_wdata = host_wdata;
      end else begin
        m_en    = step;
        m_we    = 1'b0;
        m_addr  = label;
        m_wdata = '0;
      end
    end

    cache_mem #(.DEPTH(DEPTH), .DW(W)) u_mem (
      .clk   (clk),
      .en    (m_en),
      .we    (m_we),
      .addr  (m_addr),
      .wdata (m_wdata),
      .rdata (rdata[s])
    );

    tbist_lane #(.DW(W), .SW(SGW)) u_lane (
      .clk      (clk),
      .rst_n    (rst_n),
      .ctl      (bist),
      .rdata    (rdata[s]),
      .wdata    (bwdata[s]),
      .sig_pred (),
      .sig_test (),
      .fail     (lane_fail[s])
    );

    ccc_mac #(.W(W)) u_mac (
      .ccc_en (ccc_en),
      .pre    (pre[s]),
      .prob   (rdata[s]),
      .acc    (mac[s]),
      .ovf    (mac_ovf[s])
    );

    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        pre[s] <= '0;
        acc[s] <= '0;
      end else begin
        if (step) begin
          if (first)                         pre[s] <= '0;
          else if (s == 0)                   pre[s] <= acc[s];
          else if (acc[(s>0)?s-1:0] > acc[s]) pre[s] <= acc[(s>0)?s-1:0];
          else                               pre[s] <= acc[s];
        end
        if (mac_phase) acc[s] <= mac[s];
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      mac_phase <= 1'b0;
      done      <= 1'b0;
      ovf       <= 1'b0;
    end else begin
      mac_phase <= step;
      done      <= mac_phase;
      if (step && first)               ovf <= 1'b0;
      else if (mac_phase && |mac_ovf)  ovf <= 1'b1;
    end
  end

  no_step_while_busy: assert property (@(posedge clk) disable iff (!rst_n)
    busy |-> !step);
  no_step_during_bist: assert property (@(posedge clk) disable iff (!rst_n)
    bist.active |-> !step);

endmodule
