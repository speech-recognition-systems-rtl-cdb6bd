// tb_logic_decision: random score sets (with forced ties) are presented with
// eval; the registered winner, its score and the threshold verdict are
// compared one cycle later with a reference computed in the testbench.
module tb_logic_decision;
  localparam int NW = 3;
  logic clk = 0, rst_n = 0, eval = 0;
  logic [7:0] scores [NW];
  logic [7:0] thr = '0;
  logic valid, recognized;
  logic [1:0] word;
  logic [7:0] best;
  int checks = 0, failures = 0;

  logic_decision #(.NW(NW), .W(8)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < NW; i++) scores[i] = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 1000; t++) begin
      int bi, bs;
      for (int i = 0; i < NW; i++) scores[i] = 8'($urandom);
      if (t % 5 == 0) scores[2] = scores[1];
      if (t % 7 == 0) scores[0] = scores[2];
      thr = 8'($urandom);
      bi = 0; bs = scores[0];
      for (int i = 1; i < NW; i++) if (scores[i] > bs) begin bs = scores[i]; bi = i; end
      eval = 1;
      @(negedge clk);
      eval = 0;
      for (int i = 0; i < NW; i++) scores[i] = 8'($urandom);
      checks++;
      if (!valid || word !== 2'(bi) || best !== 8'(bs) || recognized !== (bs >= thr)) begin
        failures++;
        $display("FAIL t=%0d valid %0b word %0d/%0d best %0d/%0d rec %0b", t, valid, word, bi, best, bs, recognized);
      end
      @(negedge clk);
      checks++;
      if (valid) begin
        failures++;
        $display("FAIL valid longer than one cycle");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
