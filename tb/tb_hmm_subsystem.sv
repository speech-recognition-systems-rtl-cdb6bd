// tb_hmm_subsystem: a bank of three HMM blocks loaded with different trained
// scores per word through the shared host port (word select), fed with a
// different label stream per block. Each block's score after every label is
// compared with a reference model of the HMM recursion with the consistency
// check. A BIST run over all nine memories must pass and leave the scores of
// a repeated word unchanged; a corrupted cell in one block must be reported.
module tb_hmm_subsystem;
  import srs_pkg::*;
  localparam int NW = 3, NS = 3, DEPTH = 128;
  logic clk = 0, rst_n = 0, ccc_en = 1, step = 0, first = 0;
  logic [6:0] label [NW];
  logic [7:0] scores [NW];
  logic [NW-1:0] ovf;
  logic host_we = 0; logic [1:0] host_word = '0, host_state = '0; logic [6:0] host_addr = '0; logic [7:0] host_wdata = '0;
  bist_ctl_t bist; logic [6:0] bist_addr; logic bist_fail; logic bstart = 0, bbusy, bdone;
  logic [7:0] cm [NW][NS][DEPTH];
  int macc [NW][NS];
  int checks = 0, failures = 0;

  hmm_subsystem #(.NW(NW), .NS(NS), .DEPTH(DEPTH), .W(8)) dut (.*);
  tbist_ctrl #(.DEPTH(DEPTH)) u_b (.clk, .rst_n, .start(bstart), .busy(bbusy), .done(bdone),
                                   .addr(bist_addr), .ctl(bist));

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run_word(input int len, input int seed, output int fin [NW]);
    for (int t = 0; t < len; t++) begin
      int lab [NW];
      for (int n = 0; n < NW; n++) lab[n] = (seed * 31 + t * 17 + n * 53) % DEPTH;
      @(negedge clk);
      step = 1; first = (t == 0);
      for (int n = 0; n < NW; n++) label[n] = 7'(lab[n]);
      @(negedge clk); step = 0; first = 0;
      @(negedge clk);
      for (int n = 0; n < NW; n++) begin
        int pre [NS];
        for (int s = 0; s < NS; s++)
          pre[s] = (t == 0) ? 0 : (s == 0) ? macc[n][0] :
                   (macc[n][s-1] > macc[n][s]) ? macc[n][s-1] : macc[n][s];
        for (int s = 0; s < NS; s++) macc[n][s] = (pre[s] + cm[n][s][lab[n]]) / 2;
        checks++;
        if (int'(scores[n]) != macc[n][NS-1]) begin
          failures++; $display("FAIL word %0d t %0d score %0d exp %0d", n, t, scores[n], macc[n][NS-1]);
        end
      end
    end
    for (int n = 0; n < NW; n++) fin[n] = scores[n];
  endtask

  initial begin
    int f0 [NW], f1 [NW];
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < NW; n++) for (int s = 0; s < NS; s++) for (int a = 0; a < DEPTH; a++) begin
      @(negedge clk);
      cm[n][s][a] = 8'($urandom);
      host_we = 1; host_word = 2'(n); host_state = 2'(s); host_addr = 7'(a); host_wdata = cm[n][s][a];
    end
    @(negedge clk); host_we = 0;
    for (int w = 0; w < 4; w++) run_word(30, w, f0);
    run_word(30, 9, f0);
    @(negedge clk); bstart = 1; @(negedge clk); bstart = 0;
    while (!bdone) @(negedge clk);
    checks++; if (bist_fail) begin failures++; $display("FAIL BIST on good memories"); end
    run_word(30, 9, f1);
    for (int n = 0; n < NW; n++) begin checks++; if (f0[n] != f1[n]) begin failures++; $display("FAIL score changed by BIST"); end end
    @(negedge clk); bstart = 1; @(negedge clk); bstart = 0;
    repeat (500) @(negedge clk);
    dut.g_word[2].u_hmm.g_state[0].u_mem.mem[3] = dut.g_word[2].u_hmm.g_state[0].u_mem.mem[3] ^ 8'h40;
    while (!bdone) @(negedge clk);
    checks++; if (!bist_fail) begin failures++; $display("FAIL corrupted cell not reported"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
