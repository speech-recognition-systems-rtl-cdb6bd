// tb_vac: drives the Viterbi Algorithm Controller with a stream of labels and
// Subsystem-I scores chosen by the testbench, and checks against a reference
// model: the 3-cycle schedule (step, ready), decide after a word's last
// label, the one-hot enables (the leading word's Enable(n) set when even the
// highest score is under the threshold after the warm-up, held for HOLD
// labels, then released), the switch count,
// recon_en=0 never switching, a BIST request pausing the stream until
// bist_busy falls, and the periodic BIST: with bist_every = 2 a run starts by
// itself before the first label of every third word.
module tb_vac;
  localparam int NW = 3, HOLD = 5, WARMUP = 3;
  logic clk = 0, rst_n = 0;
  logic obs_valid = 0, obs_first = 0, obs_last = 0, obs_ready;
  logic recon_en = 1; logic [7:0] thr = 8'd100;
  logic [7:0] scores_i [NW];
  logic step, first, restart, decide, bist_req = 0, bist_busy = 0, bist_start;
  logic [NW-1:0] enable;
  logic [15:0] switch_cnt;
  logic [7:0] bist_every = 0;
  int checks = 0, failures = 0;

  vac #(.NW(NW), .W(8), .HOLD(HOLD), .WARMUP(WARMUP)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int mhold [NW]; bit men [NW]; int mcnt = 0; int nlab = 0;
  int steps = 0, decides = 0, starts = 0;

  always @(posedge clk) if (rst_n) begin
    if (step) steps++;
    if (decide) decides++;
    if (bist_start) starts++;
  end

  task automatic chk(input bit c, input string what);
    checks++;
    if (!c) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic send(input bit fst, input bit lst);
    int s0, wait_cyc;
    @(negedge clk);
    obs_valid = 1; obs_first = fst; obs_last = lst;
    wait_cyc = 0;
    while (!obs_ready) begin @(negedge clk); wait_cyc++; end
    #1 chk(step && (first == fst) && (restart == lst), "step with the accepted label");
    s0 = steps;
    @(negedge clk);
    obs_valid = 0; obs_first = 0; obs_last = 0;
    chk(!obs_ready, "not ready in MAC");
    // model update at EVAL
    if (fst) begin nlab = 1; for (int n = 0; n < NW; n++) begin mhold[n] = 0; men[n] = 0; end end
    else nlab++;
    for (int n = 0; n < NW; n++) scores_i[n] = 8'($urandom_range(140, 20));
    @(negedge clk);
    chk(!obs_ready, "not ready in EVAL");
    chk(decide == lst, "decide on last label only");
    begin
      int li, ls;
      li = 0; ls = scores_i[0];
      for (int n = 1; n < NW; n++) if (scores_i[n] > ls) begin li = n; ls = scores_i[n]; end
      if (mhold[0] != 0) begin mhold[0]--; if (mhold[0] == 0) for (int n = 0; n < NW; n++) men[n] = 0; end
      else if (recon_en && nlab >= WARMUP && ls < thr) begin
        mhold[0] = HOLD; men[li] = 1; mcnt++;
      end
    end
    @(negedge clk);
    chk(obs_ready, "ready again after 3 cycles");
    for (int n = 0; n < NW; n++) chk(enable[n] == men[n], "enable");
    chk(int'(switch_cnt) == mcnt, "switch count");
  endtask

  initial begin
    int sw_on;
    for (int n = 0; n < NW; n++) scores_i[n] = 8'd200;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int w = 0; w < 8; w++)
      for (int t = 0; t < 30; t++) send(t == 0, t == 29);
    chk(decides == 8, "one decide per word");
    chk(steps == 240, "one step per label");
    sw_on = mcnt;
    chk(sw_on > 0, "reconstruction switched at least once");
    // recon disabled: no switching
    recon_en = 0;
    for (int t = 0; t < 30; t++) send(t == 0, t == 29);
    chk(int'(switch_cnt) == sw_on, "no switching with recon_en=0");
    chk(enable == '0, "enables low with recon_en=0");
    recon_en = 1;
    // BIST request while idle
    @(negedge clk); bist_req = 1;
    #1 chk(bist_start, "bist_start in idle");
    @(negedge clk); bist_req = 0; bist_busy = 1;
    obs_valid = 1; obs_first = 1;
    repeat (20) begin @(negedge clk); chk(!obs_ready && !step, "no label taken during BIST"); end
    bist_busy = 0;
    @(negedge clk);
    chk(obs_ready, "resumes after BIST");
    // the waiting label is taken at the next edge
    @(negedge clk);
    obs_valid = 0; obs_first = 0;
    chk(starts == 1, "one BIST start");
    // periodic BIST after every 2 words
    bist_every = 8'd2;
    for (int w = 0; w < 2; w++) for (int t = 0; t < 6; t++) send(t == 0, t == 5);
    chk(starts == 1, "no periodic BIST within the words");
    // the next word's first label is offered right away (send ends at a negedge)
    obs_valid = 1; obs_first = 1;
    #1 chk(bist_start && !obs_ready && !step, "periodic BIST ahead of the next word");
    @(negedge clk); bist_busy = 1;
    repeat (10) begin @(negedge clk); chk(!obs_ready && !step, "first label waits for the periodic BIST"); end
    bist_busy = 0;
    chk(starts == 2, "one periodic BIST start");
    // the waiting label stays offered and is taken once the run has ended
    for (int t = 0; t < 6; t++) send(t == 0, t == 5);
    for (int t = 0; t < 6; t++) send(t == 0, t == 5);
    chk(starts == 2, "no periodic BIST after one word");
    bist_every = 8'd0;
    for (int w = 0; w < 3; w++) for (int t = 0; t < 6; t++) send(t == 0, t == 5);
    chk(starts == 2, "no periodic BIST with bist_every=0");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
