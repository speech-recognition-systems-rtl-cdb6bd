// tb_tbist_ctrl: runs the transparent BIST sequencer with two lanes on two
// testbench RAM models (one of which can be given a stuck-at bit).
//  - every memory access is compared with the march sequence rebuilt in the
//    testbench from the test's table (order of elements, address direction,
//    read/write, written value a or ~a from the cell's original contents);
//  - the run must take 22*DEPTH+5 cycles from start to done;
//  - a fault-free memory must pass and keep its contents;
//  - a stuck-at bit must make its lane fail, and the healthy lane pass.
module tb_tbist_ctrl;
  import srs_pkg::*;
  localparam int DEPTH = 128;
  localparam int AW = 7;
  logic clk = 0, rst_n = 0, start = 0, busy, done;
  logic [AW-1:0] addr;
  bist_ctl_t ctl;
  logic [7:0] rdata [2], wdata [2];
  logic [15:0] sp [2], st [2];
  logic fail [2];
  logic [7:0] mem [2][DEPTH];
  logic [7:0] orig [2][DEPTH];
  // stuck-at model for memory 1
  logic stuck_on = 0; int stuck_addr = 0, stuck_bit = 0; logic stuck_val = 0;
  int checks = 0, failures = 0;

  tbist_ctrl #(.DEPTH(DEPTH)) dut (.clk, .rst_n, .start, .busy, .done, .addr, .ctl);

  for (genvar m = 0; m < 2; m++) begin : g_l
    tbist_lane #(.DW(8), .SW(16)) u_lane (.clk, .rst_n, .ctl, .rdata(rdata[m]),
      .wdata(wdata[m]), .sig_pred(sp[m]), .sig_test(st[m]), .fail(fail[m]));
  end

  function automatic logic [7:0] fix(int m, int a, logic [7:0] v);
    if (m == 1 && stuck_on && a == stuck_addr) v[stuck_bit] = stuck_val;
    return v;
  endfunction

  always_ff @(posedge clk) begin
    for (int m = 0; m < 2; m++) if (ctl.mem_en) begin
      if (ctl.mem_we) mem[m][addr] <= fix(m, addr, wdata[m]);
      else            rdata[m]     <= mem[m][addr];
    end
  end

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // expected access trace
  typedef struct { int a; bit we; logic [7:0] d; } acc_t;
  acc_t exp_q [$];
  int seq_err = 0;

  function automatic void build(int m);
    // prediction: reads only
    int nrd [4] = '{1, 2, 1, 2};
    bit tw [4][4] = '{'{0,1,1,1}, '{0,1,0,1}, '{0,1,1,1}, '{0,1,0,1}};
    bit ti [4][4] = '{'{0,1,0,1}, '{1,0,0,1}, '{1,0,1,0}, '{0,1,1,0}};
    exp_q.delete();
    for (int s = 0; s < 4; s++)
      for (int i = 0; i < DEPTH; i++) begin
        int a = (s < 2) ? i : DEPTH - 1 - i;
        for (int k = 0; k < nrd[s]; k++) exp_q.push_back('{a, 0, 8'h0});
      end
    for (int s = 0; s < 4; s++)
      for (int i = 0; i < DEPTH; i++) begin
        int a = (s < 2) ? i : DEPTH - 1 - i;
        for (int k = 0; k < 4; k++)
          exp_q.push_back('{a, tw[s][k], ti[s][k] ? ~orig[m][a] : orig[m][a]});
      end
  endfunction

  // trace checker on lane 0 (healthy memory)
  always @(posedge clk) if (rst_n && ctl.mem_en) begin
    if (exp_q.size() == 0) seq_err++;
    else begin
      acc_t e;
      e = exp_q.pop_front();
      if (e.a != int'(addr) || e.we != ctl.mem_we || (e.we && e.d != wdata[0])) begin
        if (seq_err < 5) $display("FAIL access a=%0d we=%0b d=%02h, expected a=%0d we=%0b d=%02h",
                                  addr, ctl.mem_we, wdata[0], e.a, e.we, e.d);
        seq_err++;
      end
    end
  end

  task automatic run_bist(output int cycles);
    build(0);
    seq_err = 0;
    @(negedge clk); start = 1; @(posedge clk); cycles = 0; @(negedge clk); start = 0;
    while (!done) begin @(posedge clk); cycles++; #1; end
    @(negedge clk);
  endtask

  initial begin
    int cyc;
    for (int m = 0; m < 2; m++) for (int a = 0; a < DEPTH; a++) begin
      mem[m][a] = 8'($urandom); orig[m][a] = mem[m][a];
    end
    repeat (3) @(negedge clk);
    rst_n = 1;
    // 1: fault-free
    run_bist(cyc);
    checks++; if (cyc != 22 * DEPTH + 5) begin failures++; $display("FAIL cycles %0d exp %0d", cyc, 22*DEPTH+5); end
    checks++; if (seq_err != 0 || exp_q.size() != 0) begin failures++; $display("FAIL trace errors %0d left %0d", seq_err, exp_q.size()); end
    checks++; if (fail[0] || fail[1]) begin failures++; $display("FAIL fault-free memory flagged"); end
    checks++; if (sp[0] != st[0]) failures++;
    for (int m = 0; m < 2; m++) for (int a = 0; a < DEPTH; a++) begin
      checks++;
      if (mem[m][a] != orig[m][a]) begin failures++; $display("FAIL contents changed m%0d a%0d", m, a); end
    end
    // 2..: stuck-at faults on memory 1
    for (int t = 0; t < 6; t++) begin
      stuck_on = 1; stuck_addr = $urandom_range(DEPTH - 1);
      stuck_bit = $urandom_range(7); stuck_val = t[0];
      mem[1][stuck_addr][stuck_bit] = stuck_val;
      for (int a = 0; a < DEPTH; a++) orig[0][a] = mem[0][a];
      run_bist(cyc);
      checks++; if (!fail[1]) begin failures++; $display("FAIL stuck-at-%0b a%0d b%0d not detected", stuck_val, stuck_addr, stuck_bit); end
      checks++; if (fail[0]) begin failures++; $display("FAIL healthy lane flagged"); end
      checks++; if (seq_err != 0) begin failures++; $display("FAIL trace errors %0d", seq_err); end
      stuck_on = 0;
    end
    // start while busy is ignored, a new run after the end works
    run_bist(cyc);
    checks++; if (fail[0] || fail[1] || cyc != 22 * DEPTH + 5) begin failures++; $display("FAIL rerun"); end
    checks++; if (busy) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
