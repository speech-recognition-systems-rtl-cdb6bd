// tb_hmm_block: scores random label sequences with a 3-state HMM block whose
// cache memories were loaded through the host port, and compares every
// accumulator after every label with a reference model of the recursion
//   pre[s] = first ? 0 : max(acc[s], acc[s-1])   (state 0: acc[0])
//   acc[s] = CCC(pre[s] + cache[s][label])
// with the consistency check on (halving) and off (wrapping, with the
// overflow flag). Checks the two-cycle timing (done two cycles after step).
// Then a transparent BIST run (tbist_ctrl as the source) must pass, keep the
// scores unchanged, and a cell corrupted during a run must be reported.
module tb_hmm_block;
  import srs_pkg::*;
  localparam int NS = 3, DEPTH = 128;
  logic clk = 0, rst_n = 0, ccc_en = 1, step = 0, first = 0;
  logic [6:0] label = '0;
  logic busy, done, ovf, bist_fail;
  logic [7:0] score;
  logic [7:0] acc_o [NS];
  logic host_we = 0; logic [1:0] host_state = '0; logic [6:0] host_addr = '0; logic [7:0] host_wdata = '0;
  bist_ctl_t bist; logic [6:0] bist_addr; logic bstart = 0, bbusy, bdone;
  logic [7:0] cm [NS][DEPTH];
  int checks = 0, failures = 0;

  hmm_block #(.NS(NS), .DEPTH(DEPTH), .W(8)) dut (.*);
  tbist_ctrl #(.DEPTH(DEPTH)) u_b (.clk, .rst_n, .start(bstart), .busy(bbusy), .done(bdone),
                                   .addr(bist_addr), .ctl(bist));

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int macc [NS];
  bit movf;

  task automatic model_step(input int lab, input bit fst, input bit ccc);
    int pre [NS];
    for (int s = 0; s < NS; s++) begin
      if (fst) pre[s] = 0;
      else if (s == 0) pre[s] = macc[0];
      else pre[s] = (macc[s-1] > macc[s]) ? macc[s-1] : macc[s];
    end
    if (fst) movf = 0;
    for (int s = 0; s < NS; s++) begin
      int sum = pre[s] + cm[s][lab];
      if (ccc) macc[s] = sum / 2;
      else begin
        if (sum > 255) movf = 1;
        macc[s] = sum % 256;
      end
    end
  endtask

  task automatic run_word(input int len, input bit ccc, input bit chk_all);
    ccc_en = ccc;
    for (int t = 0; t < len; t++) begin
      int lab = $urandom_range(DEPTH - 1);
      int gap = $urandom_range(2);
      @(negedge clk);
      step = 1; first = (t == 0); label = 7'(lab);
      @(negedge clk);
      step = 0; first = 0;
      checks++; if (!busy || done) begin failures++; $display("FAIL busy/done after step"); end
      @(negedge clk);
      checks++; if (!done) begin failures++; $display("FAIL done not two cycles after step"); end
      model_step(lab, t == 0, ccc);
      if (chk_all || t == len - 1) begin
        for (int s = 0; s < NS; s++) begin
          checks++;
          if (int'(acc_o[s]) != macc[s]) begin
            failures++;
            $display("FAIL t=%0d s=%0d acc %0d exp %0d (ccc %0b)", t, s, acc_o[s], macc[s], ccc);
          end
        end
        checks++;
        if (score != 8'(macc[NS-1]) || ovf != movf) begin
          failures++; $display("FAIL score %0d/%0d ovf %0b/%0b", score, macc[NS-1], ovf, movf);
        end
      end
      repeat (gap) @(negedge clk);
    end
  endtask

  task automatic do_bist(input bit corrupt);
    @(negedge clk); bstart = 1; @(negedge clk); bstart = 0;
    if (corrupt) begin
      repeat (DEPTH * 10) @(negedge clk);
      dut.g_state[1].u_mem.mem[40] = ~dut.g_state[1].u_mem.mem[40];
    end
    while (!bdone) @(negedge clk);
  endtask

  initial begin
    int ovf_seen = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    // load scores: high values to stress the 8-bit datapath
    for (int s = 0; s < NS; s++) for (int a = 0; a < DEPTH; a++) begin
      @(negedge clk);
      cm[s][a] = 8'($urandom_range(255, 60));
      host_we = 1; host_state = 2'(s); host_addr = 7'(a); host_wdata = cm[s][a];
    end
    @(negedge clk); host_we = 0;
    for (int w = 0; w < 6; w++) run_word(30, 1'b1, 1'b1);
    for (int w = 0; w < 6; w++) begin
      run_word(30, 1'b0, 1'b1);
      if (ovf) ovf_seen++;
    end
    checks++; if (ovf_seen == 0) begin failures++; $display("FAIL no overflow without CCC"); end
    // BIST: pass, contents unchanged
    do_bist(0);
    checks++; if (bist_fail) begin failures++; $display("FAIL BIST flags a good memory"); end
    for (int w = 0; w < 3; w++) run_word(20, 1'b1, 1'b1);
    do_bist(1);
    checks++; if (!bist_fail) begin failures++; $display("FAIL BIST misses a corrupted cell"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
