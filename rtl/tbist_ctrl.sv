// tbist_ctrl: sequencer of the transparent BIST of the cache memories. One
// controller drives every local cache memory in parallel (through one
// tbist_lane per memory), so the test time does not grow with the number of
// HMM blocks. After start it runs:
//   START    1 cycle: clear the MISRs of all lanes
//   PREDICT  signature prediction pass, reads only, per address
//            S1': R      S2': R~ R      S3': R~      S4': R R~
//            (R~ = read data inverted before it enters the MISR)
//   DRAIN    1 cycle for the last read data, SAVE 1 cycle: store signature
//   TEST     transparent march test, per address
//            S1: Ra W~a Wa W~a      S2: R~a Wa Ra W~a
//            S3: R~a Wa W~a Wa      S4: Ra W~a R~a Wa
//   DRAIN    1 cycle, COMPARE 1 cycle, then done is pulsed.
// S1 and S2 (and S1', S2') run through the addresses upward, S3 and S4 (S3',
// S4') downward. Each read or write takes one cycle, so a run lasts
// 22*DEPTH + 5 cycles from the start pulse to the done pulse. The write data
// is derived in each lane from the element's first read, so the memory ends
// with its original contents. The march elements, the prediction pass and the
// address orders follow the paper; one operation per cycle and the single
// drain/save cycles are this design's choice. start is ignored while busy.
module tbist_ctrl
  import srs_pkg::*;
#(
  parameter int unsigned DEPTH = 128,
  parameter int unsigned AW    = $clog2(DEPTH)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,
  output logic          busy,
  output logic          done,    // one-cycle pulse at the end of a run
  output logic [AW-1:0] addr,
  output bist_ctl_t     ctl
);

  typedef enum logic [2:0] {S_IDLE, S_START, S_RUN, S_DRAIN, S_SAVE, S_CMP} st_e;
  typedef enum logic [1:0] {OP_R, OP_W} opk_e;

  st_e           st;
  logic          phase;     // 0: prediction, 1: test
  logic [1:0]    seq;       // march element S1..S4
  logic [1:0]    opi;       // operation inside the element
  logic [AW-1:0] acnt;      // address counter

  // operation table
  opk_e op_kind;
  logic op_inv;             // read: inversion; write: write ~a
  logic op_first;           // read that recovers a (test pass)
  logic [1:0] op_last;      // index of the element's last operation

  always_comb begin
    op_kind  = OP_R;
    op_inv   = 1'b0;
    op_first = 1'b0;
    op_last  = 2'd0;
    if (!phase) begin
      unique case (seq)
        2'd0: begin op_last = 2'd0; op_inv = 1'b0; end
        2'd1: begin op_last = 2'd1; op_inv = (opi == 2'd0); end
        2'd2: begin op_last = 2'd0; op_inv = 1'b1; end
        default: begin op_last = 2'd1; op_inv = (opi == 2'd1); end
      endcase
    end else begin
      op_last = 2'd3;
      unique case (seq)
        2'd0: begin  // Ra W~a Wa W~a
          op_kind = (opi == 2'd0) ? OP_R : OP_W;
          op_inv  = (opi == 2'd1) || (opi == 2'd3);
        end
        2'd1: begin  // R~a Wa Ra W~a
          op_kind = opi[0] ? OP_W : OP_R;
          op_inv  = (opi == 2'd0) || (opi == 2'd3);
        end
        2'd2: begin  // R~a Wa W~a Wa
          op_kind = (opi == 2'd0) ? OP_R : OP_W;
          op_inv  = (opi == 2'd0) || (opi == 2'd2);
        end
        default: begin  // Ra W~a R~a Wa
          op_kind = opi[0] ? OP_W : OP_R;
          op_inv  = (opi == 2'd1) || (opi == 2'd2);
        end
      endcase
      op_first = (opi == 2'd0);
    end
  end

  // issue side
  logic issue;
  assign issue = (st == S_RUN);
  assign addr  = (seq[1]) ? AW'(DEPTH - 1 - acnt) : acnt;
  assign busy  = (st != S_IDLE);

  // read data side: the read issued last cycle is on the memory output now
  logic rd_v, rd_inv_q, rd_first_q, rd_phase_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rd_v       <= 1'b0;
      rd_inv_q   <= 1'b0;
      rd_first_q <= 1'b0;
      rd_phase_q <= 1'b0;
    end else begin
      rd_v       <= issue && (op_kind == OP_R);
      rd_inv_q   <= op_inv;
      rd_first_q <= op_first;
      rd_phase_q <= phase;
    end
  end

  always_comb begin
    ctl          = '0;
    ctl.active   = busy;
    ctl.mem_en   = issue;
    ctl.mem_we   = issue && (op_kind == OP_W);
    ctl.w_inv    = op_inv;
    ctl.rd_misr  = rd_v;
    ctl.rd_inv   = rd_v && !rd_phase_q && rd_inv_q;
    ctl.a_load   = rd_v && rd_phase_q && rd_first_q;
    ctl.a_inv    = rd_inv_q;
    ctl.sig_save = (st == S_START) || (st == S_SAVE);
    ctl.compare  = (st == S_CMP);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st    <= S_IDLE;
      phase <= 1'b0;
      seq   <= '0;
      opi   <= '0;
      acnt  <= '0;
      done  <= 1'b0;
    end else begin
      done <= 1'b0;
      unique case (st)
        S_IDLE: if (start) st <= S_START;
        S_START: begin
          st    <= S_RUN;
          phase <= 1'b0;
          seq   <= '0;
          opi   <= '0;
          acnt  <= '0;
        end
        S_RUN: begin
          if (opi != op_last) opi <= opi + 2'd1;
          else begin
            opi <= '0;
            if (acnt != AW'(DEPTH - 1)) acnt <= acnt + 1'b1;
            else begin
              acnt <= '0;
              seq  <= seq + 2'd1;
              if (seq == 2'd3) st <= S_DRAIN;
            end
          end
        end
        S_DRAIN: st <= phase ? S_CMP : S_SAVE;
        S_SAVE: begin
          st    <= S_RUN;
          phase <= 1'b1;
        end
        S_CMP: begin
          st    <= S_IDLE;
          phase <= 1'b0;
          done  <= 1'b1;
        end
        default: st <= S_IDLE;
      endcase
    end
  end

  // a write must never share a cycle with the recovery of a from a read of the
  // same element except as its first write, which is what the lanes expect
  a_load_then_write: assert property (@(posedge clk) disable iff (!rst_n)
    ctl.a_load |-> ctl.mem_we);

endmodule
