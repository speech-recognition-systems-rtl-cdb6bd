// tb_srs_noise: noise-immunity workload. Three word models (3 states, 128
// labels) are loaded as in tb_srs_top; test words are 30 labels (10 per
// state). For noise levels of 90, 80, 70, 60, 50 and 25 percent of the labels
// replaced by random labels, each level runs 60 words with the on-line
// reconstruction off and the same 60 words with it on, and prints the share
// recognized correctly before and after reconstruction, for switching
// thresholds of 120 and 150.
// A second table compares the 8-bit datapath with the consistency check off
// (sums wrap) and on, reconstruction off, at 0, 25 and 50 percent noise.
// Checks: with reconstruction off no MUX ever switches and Subsystem-II
// scores equal Subsystem-I scores; with it on, the generators are switched in
// at the high noise levels; at 0 percent noise every word is recognized in
// both modes and with the consistency check on, which does no worse than
// with it off; every word yields exactly one result.
module tb_srs_noise;
  import srs_pkg::*;
  localparam int NW = WORDS, NS = STATES, DEPTH = CB_DEPTH, NT = 8;
  localparam int BLK = 14, LPW = 30, TRIALS = 20;

  logic clk = 0, rst_n = 0;
  logic obs_valid = 0, obs_first = 0, obs_last = 0, obs_ready;
  logic [6:0] obs_label = '0;
  logic ccc_en = 1, recon_en = 0;
  logic [7:0] recon_thr = 8'd120, decide_thr = 8'd0;
  logic host_we = 0; logic [1:0] host_word = '0, host_state = '0; logic [6:0] host_addr = '0; logic [7:0] host_wdata = '0;
  logic gen_tbl_we = 0, gen_stay_we = 0; logic [1:0] gen_word = '0, gen_state = '0; logic [2:0] gen_idx = '0;
  logic [6:0] gen_label = '0; logic [7:0] gen_stay = '0;
  logic result_valid, result_recognized, ovf, bist_req = 0, bist_busy, bist_done, bist_pass;
  logic [7:0] bist_every = '0;
  logic [1:0] result_word; logic [7:0] result_score;
  logic [7:0] scores_i [NW], scores_ii [NW];
  logic [NW-1:0] enable; logic [15:0] switch_cnt;
  int checks = 0, failures = 0;

  srs_top dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input bit c, input string what);
    checks++;
    if (!c) begin failures++; if (failures < 20) $display("FAIL %s", what); end
  endtask

  int nres = 0;
  always @(posedge clk) if (rst_n && result_valid) nres++;

  // one word, labels back to back; returns the recognized word
  task automatic send_word(input int k, input int noise, input int seed, output int rw);
    int lab, r;
    for (int t = 0; t < LPW; t++) begin
      r = (seed * 7919 + t * 104729 + k * 31337) % 100;
      lab = (r < noise) ? ((seed * 131 + t * 71 + k * 17) % DEPTH)
                        : ((k * NS + t / (LPW / NS)) * BLK + (seed + t * 5) % BLK);
      @(negedge clk);
      obs_valid = 1; obs_label = 7'(lab); obs_first = (t == 0); obs_last = (t == LPW - 1);
      #1;
      while (!obs_ready) begin @(negedge clk); #1; end
    end
    @(negedge clk);
    obs_valid = 0; obs_first = 0; obs_last = 0;
    while (!result_valid) @(negedge clk);
    rw = result_word;
    if (!recon_en) begin
      for (int n = 0; n < NW; n++) chk(scores_ii[n] == scores_i[n], "Subsystem-II equals Subsystem-I without reconstruction");
    end
  endtask

  initial begin
    int levels [6] = '{90, 80, 70, 60, 50, 25};
    int ok_before, ok_after, rw, sw0, words, sw_high;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int k = 0; k < NW; k++) for (int s = 0; s < NS; s++) for (int a = 0; a < DEPTH; a++) begin
      @(negedge clk);
      host_we = 1; host_word = 2'(k); host_state = 2'(s); host_addr = 7'(a);
      host_wdata = (a / BLK == k * NS + s) ? 8'(220 + (a * 7) % 31) : 8'(10 + (a * 13) % 41);
    end
    @(negedge clk); host_we = 0;
    for (int k = 0; k < NW; k++) for (int s = 0; s < NS; s++) begin
      @(negedge clk); gen_stay_we = 1; gen_word = 2'(k); gen_state = 2'(s); gen_stay = 8'd230;
      for (int i = 0; i < NT; i++) begin
        @(negedge clk); gen_stay_we = 0; gen_tbl_we = 1; gen_idx = 3'(i); gen_label = 7'((k * NS + s) * BLK + i);
      end
      @(negedge clk); gen_tbl_we = 0;
    end
    words = 0;
    // clean speech, both modes
    for (int m = 0; m < 2; m++) begin
      recon_en = m[0];
      for (int r = 0; r < 3 * NW; r++) begin send_word(r % NW, 0, r, rw); words++; chk(rw == r % NW, "clean word recognized"); end
    end
    sw_high = 0;
    for (int ti = 0; ti < 2; ti++) begin
    recon_thr = (ti == 0) ? 8'd120 : 8'd150;
    $display("switching threshold %0d", recon_thr);
    $display("noise%%  correct before  correct after  (of %0d words)", TRIALS * NW);
    foreach (levels[li]) begin
      recon_en = 0;
      sw0 = switch_cnt;
      ok_before = 0;
      for (int r = 0; r < TRIALS * NW; r++) begin send_word(r % NW, levels[li], r + 1000 * li, rw); words++; if (rw == r % NW) ok_before++; end
      chk(switch_cnt == 16'(sw0) && enable == '0, "no switching with reconstruction off");
      recon_en = 1;
      sw0 = switch_cnt;
      ok_after = 0;
      for (int r = 0; r < TRIALS * NW; r++) begin send_word(r % NW, levels[li], r + 1000 * li, rw); words++; if (rw == r % NW) ok_after++; end
      if (levels[li] >= 50) sw_high += int'(switch_cnt) - sw0;
      $display("%5d   %6.2f         %6.2f", levels[li], 100.0 * ok_before / (TRIALS * NW), 100.0 * ok_after / (TRIALS * NW));
    end
    end
    chk(sw_high > 0, "generators switched in at high noise");
    // consistency check off against on
    recon_en = 0;
    $display("noise%%  correct CCC off  correct CCC on  (of %0d words)", TRIALS * NW);
    foreach (levels[li]) if (levels[li] <= 50 || li == 0) begin
      int lv, ok_off, ok_on;
      lv = (li == 0) ? 0 : levels[li];
      ok_off = 0; ok_on = 0;
      ccc_en = 0;
      for (int r = 0; r < TRIALS * NW; r++) begin send_word(r % NW, lv, r + 5000, rw); words++; if (rw == r % NW) ok_off++; end
      ccc_en = 1;
      for (int r = 0; r < TRIALS * NW; r++) begin send_word(r % NW, lv, r + 5000, rw); words++; if (rw == r % NW) ok_on++; end
      $display("%5d   %6.2f          %6.2f", lv, 100.0 * ok_off / (TRIALS * NW), 100.0 * ok_on / (TRIALS * NW));
      chk(ok_on >= ok_off, "consistency check does no worse");
      if (lv == 0) chk(ok_on == TRIALS * NW, "clean words recognized with the consistency check");
    end
    @(negedge clk);
    chk(nres == words, "one result per word");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
