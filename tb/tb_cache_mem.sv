// tb_cache_mem: self-checking test of the local cache memory. Fills all 128
// entries with random bytes, reads them back in random order and checks the
// one-cycle read latency, that a write leaves rdata unchanged and that rdata
// holds while en=0. Reference: a plain array in the testbench.
module tb_cache_mem;
  localparam int DEPTH = 128;
  logic clk = 0, en = 0, we = 0;
  logic [6:0] addr = '0;
  logic [7:0] wdata = '0, rdata;
  logic [7:0] ref_mem [DEPTH];
  int checks = 0, failures = 0;

  cache_mem #(.DEPTH(DEPTH), .DW(8)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input logic [7:0] got, exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %02h exp %02h", what, got, exp);
    end
  endtask

  initial begin
    logic [7:0] held;
    @(negedge clk);
    for (int a = 0; a < DEPTH; a++) begin
      en = 1; we = 1; addr = 7'(a); wdata = 8'($urandom);
      ref_mem[a] = wdata;
      @(negedge clk);
    end
    for (int i = 0; i < 400; i++) begin
      int a;
      a = $urandom_range(DEPTH - 1);
      en = 1; we = 0; addr = 7'(a);
      @(negedge clk);
      chk(rdata, ref_mem[a], "read");
      // a write must not disturb the read port
      held = rdata;
      en = 1; we = 1; addr = 7'($urandom_range(DEPTH - 1)); wdata = 8'($urandom);
      ref_mem[addr] = wdata;
      @(negedge clk);
      chk(rdata, held, "rdata during write");
      en = 0; we = 0; addr = 7'($urandom_range(DEPTH - 1));
      @(negedge clk);
      chk(rdata, held, "rdata while idle");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
