// tb_tbist_lane: drives the control bundle of one BIST lane by hand.
// Checks: recovery of a from a first read (plain and inverted) and the write
// data a / ~a in the same cycle and later; MISR injection with and without
// read inversion against a reference model; signature save and clear; the
// pass/fail verdict of compare for equal and different signatures.
module tb_tbist_lane;
  import srs_pkg::*;
  logic clk = 0, rst_n = 0;
  bist_ctl_t ctl;
  logic [7:0] rdata = '0, wdata;
  logic [15:0] sig_pred, sig_test;
  logic fail;
  int checks = 0, failures = 0;

  tbist_lane #(.DW(8), .SW(16)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [15:0] nxt(logic [15:0] s, logic [7:0] d);
    return {s[14:0], 1'b0} ^ (s[15] ? 16'h1021 : 16'h0) ^ {8'h0, d};
  endfunction

  task automatic chk(input logic c, input string what);
    checks++;
    if (!c) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    logic [15:0] model, pred;
    logic [7:0] a;
    ctl = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    // clear
    ctl.sig_save = 1; @(negedge clk); ctl = '0;
    chk(sig_test == 0, "clear");
    // a recovery and write data
    for (int i = 0; i < 50; i++) begin
      logic inv;
      inv = i[0];
      a = 8'($urandom);
      rdata = inv ? ~a : a;
      ctl.a_load = 1; ctl.a_inv = inv; ctl.mem_we = 1; ctl.mem_en = 1; ctl.w_inv = 0;
      #1 chk(wdata == a, "first write a");
      ctl.w_inv = 1;
      #1 chk(wdata == ~a, "first write ~a");
      @(negedge clk);
      ctl = '0; rdata = 8'($urandom);
      ctl.mem_we = 1; ctl.w_inv = 0;
      #1 chk(wdata == a, "held a");
      ctl.w_inv = 1;
      #1 chk(wdata == ~a, "held ~a");
      @(negedge clk); ctl = '0;
    end
    // prediction pass with inversions, then the same data raw -> pass
    ctl.sig_save = 1; @(negedge clk); ctl = '0;
    model = 0;
    for (int i = 0; i < 64; i++) begin
      logic inv;
      inv = ($urandom_range(1) == 1);
      a = 8'(i * 29 + 3);
      rdata = a; ctl.rd_misr = 1; ctl.rd_inv = inv;
      model = nxt(model, inv ? ~a : a);
      @(negedge clk);
      chk(sig_test == model, "prediction MISR");
    end
    ctl = '0;
    pred = model;
    ctl.sig_save = 1; @(negedge clk); ctl = '0;
    chk(sig_pred == pred && sig_test == 0, "save and clear");
    // test pass feeding the same (pre-inverted) values raw
    model = 0;
    for (int i = 0; i < 64; i++) begin
      a = 8'(i * 29 + 3);
      ctl.rd_misr = 1;
      rdata = a;
      model = nxt(model, a);
      @(negedge clk);
    end
    ctl = '0;
    ctl.compare = 1; @(negedge clk); ctl = '0;
    chk(fail == (model != pred), "compare verdict");
    // equal streams must pass
    ctl.sig_save = 1; @(negedge clk); ctl = '0;
    for (int r = 0; r < 2; r++) begin
      for (int i = 0; i < 40; i++) begin
        ctl.rd_misr = 1; rdata = 8'(i * 7); ctl.rd_inv = (r == 0) ? i[0] : 1'b0;
        if (r == 1) rdata = i[0] ? ~8'(i * 7) : 8'(i * 7);
        @(negedge clk);
      end
      ctl = '0;
      if (r == 0) begin ctl.sig_save = 1; @(negedge clk); ctl = '0; end
    end
    ctl.compare = 1; @(negedge clk); ctl = '0;
    chk(!fail, "matching signatures pass");
    // one corrupted read must fail
    ctl.sig_save = 1; @(negedge clk); ctl = '0;
    for (int r = 0; r < 2; r++) begin
      for (int i = 0; i < 40; i++) begin
        ctl.rd_misr = 1; rdata = 8'(i * 7);
        if (r == 1 && i == 17) rdata[2] = ~rdata[2];
        @(negedge clk);
      end
      ctl = '0;
      if (r == 0) begin ctl.sig_save = 1; @(negedge clk); ctl = '0; end
    end
    ctl.compare = 1; @(negedge clk); ctl = '0;
    chk(fail, "corrupted read fails");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
