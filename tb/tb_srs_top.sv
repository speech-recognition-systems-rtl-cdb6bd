// tb_srs_top: end-to-end test of the recognition hardware at its default
// size (3 words, 3-state HMMs, 128-entry cache memories). Word models are
// loaded through the host port: word k, state s favours its own block of 14
// labels (score 220..250) and gives every other label a low score (10..50).
// The generators get 8 labels of each state's block and a stay threshold of
// 230. Test words are 30 labels, 10 per state, drawn from the word's blocks,
// with a chosen fraction replaced by random labels (noise).
// A cycle-level reference model of the whole design (both HMM subsystems,
// the controller's switching rule, the generators' LFSR process, the MUX chain
// and the decision) predicts every result; result word, score and verdict,
// both subsystems' scores and the enable pattern after every label are
// compared with it.
// Mechanisms that must each happen at least once: a switch to a generator, a
// switch back to the input, an 8-bit accumulator overflow with the consistency
// check off, a recognized and an unrecognized word, a BIST pass, a BIST
// failure on a corrupted cell, and a label held off (obs_ready low) by a BIST
// run, and a periodic BIST run started by itself (bist_every) between words.
// Also checks the 3-cycle label rate and the BIST run length.
module tb_srs_top;
  import srs_pkg::*;
  localparam int NW = WORDS, NS = STATES, DEPTH = CB_DEPTH, NT = 8, HOLD = 5;
  localparam int BLK = 14, LPW = 30;

  logic clk = 0, rst_n = 0;
  logic obs_valid = 0, obs_first = 0, obs_last = 0, obs_ready;
  logic [6:0] obs_label = '0;
  logic ccc_en = 1, recon_en = 1;
  logic [7:0] recon_thr = 8'd120, decide_thr = 8'd150;
  logic host_we = 0; logic [1:0] host_word = '0, host_state = '0; logic [6:0] host_addr = '0; logic [7:0] host_wdata = '0;
  logic gen_tbl_we = 0, gen_stay_we = 0; logic [1:0] gen_word = '0, gen_state = '0; logic [2:0] gen_idx = '0;
  logic [6:0] gen_label = '0; logic [7:0] gen_stay = '0;
  logic result_valid, result_recognized, ovf, bist_req = 0, bist_busy, bist_done, bist_pass;
  logic [1:0] result_word; logic [7:0] result_score;
  logic [7:0] scores_i [NW], scores_ii [NW];
  logic [NW-1:0] enable; logic [15:0] switch_cnt;
  logic [7:0] bist_every = '0;
  int checks = 0, failures = 0;

  srs_top dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- reference model ----------------
  logic [7:0] cm [NW][NS][DEPTH];
  logic [6:0] gtbl [NW][NS][NT];
  logic [7:0] gstay [NW][NS];
  int acc1 [NW][NS], acc2 [NW][NS];
  logic [15:0] glfsr [NW]; int gstate [NW]; int glab [NW];
  int mhold [NW]; bit men [NW]; int nlab; bit movf;

  function automatic void hmm_step(ref int acc [NW][NS], input int n, input int lab, input bit fst, input bit ccc);
    int pre [NS];
    for (int s = 0; s < NS; s++)
      pre[s] = fst ? 0 : (s == 0) ? acc[n][0] : (acc[n][s-1] > acc[n][s]) ? acc[n][s-1] : acc[n][s];
    for (int s = 0; s < NS; s++) begin
      int sum = pre[s] + cm[n][s][lab];
      if (ccc) acc[n][s] = sum / 2;
      else begin if (sum > 255) movf = 1; acc[n][s] = sum % 256; end
    end
  endfunction

  function automatic void model_reset();
    for (int n = 0; n < NW; n++) begin
      glfsr[n] = 16'hACE1 ^ 16'(n * 16'h1F35); gstate[n] = 0; glab[n] = 0;
      mhold[n] = 0; men[n] = 0;
      for (int s = 0; s < NS; s++) begin acc1[n][s] = 0; acc2[n][s] = 0; end
    end
  endfunction

  // one label through the model; returns nothing, updates state
  function automatic void model_label(input int lab, input bit fst, input bit lst, input bit ccc, input bit recon);
    int l2, li, ls;
    if (fst) begin nlab = 1; movf = 0; for (int n = 0; n < NW; n++) begin mhold[n] = 0; men[n] = 0; end end
    else nlab++;
    l2 = lab;
    for (int n = 0; n < NW; n++) if (men[n]) l2 = glab[n];
    for (int n = 0; n < NW; n++) begin
      hmm_step(acc1, n, lab, fst, ccc);
      hmm_step(acc2, n, l2, fst, ccc);
      // generator
      glfsr[n] = {glfsr[n][14:0], glfsr[n][15] ^ glfsr[n][13] ^ glfsr[n][12] ^ glfsr[n][10]};
      if (lst) gstate[n] = 0;
      else if (gstate[n] != NS - 1 && glfsr[n][15:8] >= gstay[n][gstate[n]]) gstate[n]++;
      glab[n] = gtbl[n][gstate[n]][glfsr[n][2:0]];
    end
    li = 0; ls = acc1[0][NS-1];
    for (int n = 1; n < NW; n++) if (acc1[n][NS-1] > ls) begin li = n; ls = acc1[n][NS-1]; end
    if (mhold[0] != 0) begin mhold[0]--; if (mhold[0] == 0) for (int n = 0; n < NW; n++) men[n] = 0; end
    else if (recon && nlab >= NS && ls < recon_thr) begin mhold[0] = HOLD; men[li] = 1; end
  endfunction

  // ---------------- stimulus ----------------
  int n_switch_on = 0, n_switch_back = 0, n_ovf = 0, n_rec = 0, n_unrec = 0;
  int n_bist_pass = 0, n_bist_fail = 0, n_stall = 0;
  logic [NW-1:0] prev_en = '0;

  always @(posedge clk) if (rst_n) begin
    for (int n = 0; n < NW; n++) begin
      if (enable[n] && !prev_en[n]) n_switch_on++;
      if (!enable[n] && prev_en[n]) n_switch_back++;
    end
    prev_en <= enable;
    if (obs_valid && !obs_ready && bist_busy) n_stall++;
  end

  task automatic chk(input bit c, input string what);
    checks++;
    if (!c) begin failures++; if (failures < 20) $display("FAIL %s", what); end
  endtask

  function automatic int own_label(int k, int s);
    return (k * NS + s) * BLK + $urandom_range(BLK - 1);
  endfunction

  // sends one word of LPW labels; noise in percent; returns the result
  task automatic send_word(input int k, input int noise, output int rword, output bit rrec);
    int last_take = -1, cyc = 0;
    for (int t = 0; t < LPW; t++) begin
      int lab, s;
      s = t / (LPW / NS);
      lab = ($urandom_range(99) < noise) ? $urandom_range(DEPTH - 1) : own_label(k, s);
      @(negedge clk);
      obs_valid = 1; obs_label = 7'(lab); obs_first = (t == 0); obs_last = (t == LPW - 1);
      #1;
      while (!obs_ready) begin @(negedge clk); #1; end
      @(negedge clk);
      obs_valid = 0; obs_first = 0; obs_last = 0;
      model_label(lab, t == 0, t == LPW - 1, ccc_en, recon_en);
      @(negedge clk);   // EVAL
      @(negedge clk);   // enables updated
      for (int n = 0; n < NW; n++) chk(enable[n] == men[n], "enable pattern");
      for (int n = 0; n < NW; n++) begin
        if (failures < 3 && !(int'(scores_i[n]) == acc1[n][NS-1] && int'(scores_ii[n]) == acc2[n][NS-1]))
          $display("t=%0d n=%0d lab=%0d I %0d/%0d II %0d/%0d en %0b", t, n, lab, scores_i[n], acc1[n][NS-1], scores_ii[n], acc2[n][NS-1], men[n]);
        chk(int'(scores_i[n]) == acc1[n][NS-1] && int'(scores_ii[n]) == acc2[n][NS-1], "subsystem scores");
      end
    end
    // result was valid in the cycle after EVAL of the last label
    begin
      int bi = 0, bs = acc2[0][NS-1];
      for (int n = 1; n < NW; n++) if (acc2[n][NS-1] > bs) begin bs = acc2[n][NS-1]; bi = n; end
      chk(int'(result_word) == bi && int'(result_score) == bs && result_recognized == (bs >= decide_thr), "decision");
      rword = result_word; rrec = result_recognized;
      if (!ccc_en) chk(ovf == movf, "overflow flag");
      if (ovf) n_ovf++;
      if (result_recognized) n_rec++; else n_unrec++;
    end
  endtask

  int res_valid_cnt = 0;
  always @(posedge clk) if (rst_n && result_valid) res_valid_cnt++;

  // labels offered back to back, one word; checks the acceptance interval and
  // the result only
  int cyc_now = 0, last_acc = -1, gap_err = 0;
  always @(posedge clk) begin
    cyc_now++;
    if (rst_n && obs_valid && obs_ready) begin
      if (fast_mode && last_acc >= 0 && cyc_now - last_acc != 3) gap_err++;
      last_acc = cyc_now;
    end
  end
  bit fast_mode = 0;

  task automatic send_fast(input int k, input int noise);
    int bi, bs;
    fast_mode = 1; last_acc = -1; gap_err = 0;
    @(negedge clk);
    for (int t = 0; t < LPW; t++) begin
      int lab;
      lab = ($urandom_range(99) < noise) ? $urandom_range(DEPTH - 1) : own_label(k, t / (LPW / NS));
      obs_valid = 1; obs_label = 7'(lab); obs_first = (t == 0); obs_last = (t == LPW - 1);
      #1;
      while (!obs_ready) begin @(negedge clk); #1; end
      model_label(lab, t == 0, t == LPW - 1, ccc_en, recon_en);
      @(negedge clk);
    end
    obs_valid = 0; obs_first = 0; obs_last = 0;
    begin
      while (!result_valid) @(negedge clk);
      // last label taken in cycle T (its edge counted as last_acc): result_valid
      // must be high in cycle T+3, which is seen before edge last_acc+3
      chk(cyc_now - last_acc == 2, "result 3 cycles after the last label");
    end
    fast_mode = 0;
    chk(gap_err == 0, "one label every 3 cycles");
    bi = 0; bs = acc2[0][NS-1];
    for (int n = 1; n < NW; n++) if (acc2[n][NS-1] > bs) begin bs = acc2[n][NS-1]; bi = n; end
    chk(int'(result_word) == bi && int'(result_score) == bs, "decision, back-to-back labels");
    if (result_recognized) n_rec++; else n_unrec++;
    @(negedge clk);
  endtask

  int bist_cyc = 0;
  always @(posedge clk) if (rst_n && bist_busy) bist_cyc++;
  int n_bist_done = 0;
  always @(posedge clk) if (rst_n && bist_done) n_bist_done++;

  // starts a BIST run and offers word k at once: its first label has to wait
  // for the end of the test. corrupt flips a bit of a cache memory mid-test.
  task automatic run_bist(input bit corrupt, input int k, output int cyc);
    int rw; bit rr;
    @(negedge clk); bist_req = 1;
    while (!bist_busy) @(negedge clk);
    bist_req = 0; bist_cyc = 0;
    if (corrupt)
      fork
        begin
          repeat (1000) @(negedge clk);
          dut.u_sub_ii.g_word[1].u_hmm.g_state[2].u_mem.mem[77] = dut.u_sub_ii.g_word[1].u_hmm.g_state[2].u_mem.mem[77] ^ 8'h01;
        end
      join_none
    send_word(k, 0, rw, rr);
    cyc = bist_cyc;
    if (bist_pass) n_bist_pass++; else n_bist_fail++;
    chk(bist_pass == !corrupt, "BIST verdict");
    if (!corrupt) chk(rw == k, "recognition right after BIST");
  endtask

  initial begin
    int rw, cyc, correct;
    bit rr;
    model_reset();
    repeat (3) @(negedge clk);
    rst_n = 1;
    // load word models
    for (int k = 0; k < NW; k++) for (int s = 0; s < NS; s++) for (int a = 0; a < DEPTH; a++) begin
      cm[k][s][a] = (a / BLK == k * NS + s) ? 8'($urandom_range(250, 220)) : 8'($urandom_range(50, 10));
      @(negedge clk);
      host_we = 1; host_word = 2'(k); host_state = 2'(s); host_addr = 7'(a); host_wdata = cm[k][s][a];
    end
    @(negedge clk); host_we = 0;
    for (int k = 0; k < NW; k++) for (int s = 0; s < NS; s++) begin
      gstay[k][s] = 8'd230;
      @(negedge clk); gen_stay_we = 1; gen_word = 2'(k); gen_state = 2'(s); gen_stay = gstay[k][s];
      for (int i = 0; i < NT; i++) begin
        gtbl[k][s][i] = 7'((k * NS + s) * BLK + i);
        @(negedge clk); gen_stay_we = 0; gen_tbl_we = 1; gen_idx = 3'(i); gen_label = gtbl[k][s][i];
      end
      @(negedge clk); gen_tbl_we = 0;
    end
    for (int n = 0; n < NW; n++) glab[n] = (n == 0) ? 0 : 0;
    // the generator label after reset is 0 until its state-0 entry 0 is loaded
    for (int n = 0; n < NW; n++) glab[n] = gtbl[n][0][0];

    // clean words: each must be recognized as itself
    correct = 0;
    for (int r = 0; r < 6; r++) begin
      send_word(r % NW, 0, rw, rr);
      chk(rw == r % NW, "clean word recognized as itself");
      if (rw == r % NW) correct++;
    end
    // noisy words with reconstruction
    for (int r = 0; r < 9; r++) send_word(r % NW, 70, rw, rr);
    // label rate: back-to-back labels are taken every 3 cycles
    send_fast(0, 40);
    send_fast(1, 60);
    // BIST, fault free and with a corrupted cell
    run_bist(1'b0, 2, cyc);
    if (cyc != 22 * DEPTH + 5) $display("BIST cycles %0d", cyc);
    chk(cyc == 22 * DEPTH + 5, "BIST run length");
    send_word(1, 0, rw, rr);
    chk(rw == 1, "recognition unchanged after BIST");
    run_bist(1'b1, 0, cyc);
    // put the corrupted byte back (the test leaves the corrupted value)
    dut.u_sub_ii.g_word[1].u_hmm.g_state[2].u_mem.mem[77] = cm[1][2][77];
    // consistency check off: the 8-bit accumulators wrap
    ccc_en = 0;
    for (int r = 0; r < 3; r++) send_word(r, 0, rw, rr);
    ccc_en = 1;
    // a high threshold: not recognized
    decide_thr = 8'd255;
    send_word(2, 90, rw, rr);
    decide_thr = 8'd150;
    // periodic BIST every 2 words: more than 2 words have passed since the
    // last run, so one starts at once; the next one before the third word
    begin
      int d0, n_periodic;
      d0 = n_bist_done;
      bist_every = 8'd2;
      for (int r = 0; r < 3; r++) begin
        send_word(r, 0, rw, rr);
        chk(rw == r, "recognition with periodic BIST");
      end
      repeat (3000) @(negedge clk);
      n_periodic = n_bist_done - d0;
      $display("periodic BIST runs: %0d", n_periodic);
      chk(n_periodic == 2, "periodic BIST runs");
      chk(bist_pass, "periodic BIST passes");
      bist_every = '0;
    end
    if (res_valid_cnt != 27) $display("results %0d", res_valid_cnt);
    chk(res_valid_cnt == 27, "one result per word (24 + 3)");

    $display("mechanisms: switch_on=%0d switch_back=%0d ovf=%0d recognized=%0d unrecognized=%0d bist_pass=%0d bist_fail=%0d stall=%0d",
             n_switch_on, n_switch_back, n_ovf, n_rec, n_unrec, n_bist_pass, n_bist_fail, n_stall);
    chk(n_switch_on > 0, "switch to generator happened");
    chk(n_switch_back > 0, "switch back happened");
    chk(n_ovf > 0, "overflow without CCC happened");
    chk(n_rec > 0 && n_unrec > 0, "recognized and unrecognized");
    chk(n_bist_pass > 0 && n_bist_fail > 0, "BIST pass and fail");
    chk(n_stall > 0, "label stalled by BIST");
    chk(n_bist_done >= 4, "periodic BIST happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
