// tb_misr: checks the signature register against a reference model of the
// Galois shift with polynomial 0x1021 and input XOR, over random input
// streams with random enable gaps and a clear, and checks that one flipped
// input bit changes the final signature.
module tb_misr;
  logic clk = 0, rst_n = 0, clear = 0, en = 0;
  logic [7:0] din = '0;
  logic [15:0] sig;
  int checks = 0, failures = 0;

  misr #(.W(16), .DW(8), .POLY(16'h1021)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [15:0] nxt(logic [15:0] s, logic [7:0] d);
    return {s[14:0], 1'b0} ^ (s[15] ? 16'h1021 : 16'h0) ^ {8'h0, d};
  endfunction

  task automatic run(input int seed_len, input int flip, output logic [15:0] fin);
    logic [15:0] m = '0;
    clear = 1; @(negedge clk); clear = 0;
    for (int i = 0; i < seed_len; i++) begin
      en = ($urandom_range(3) != 0);
      din = 8'((i * 37 + 11) ^ (i >> 2));
      if (i == flip) din[3] = ~din[3];
      if (en) m = nxt(m, din);
      @(negedge clk);
      checks++;
      if (sig !== m) begin
        failures++;
        $display("FAIL step %0d sig %04h exp %04h", i, sig, m);
      end
    end
    en = 0;
    fin = sig;
  endtask

  initial begin
    logic [15:0] s0, s1;
    repeat (2) @(negedge clk);
    rst_n = 1;
    checks++;
    if (sig !== 16'h0) failures++;
    // enables are random, so force them on for the comparison runs
    run(500, -1, s0);
    for (int k = 0; k < 5; k++) begin
      logic [15:0] a, b;
      int flip;
      flip = $urandom_range(300);
      // same stream twice with enable always on, once with one bit flipped
      clear = 1; @(negedge clk); clear = 0;
      a = '0; b = '0;
      for (int i = 0; i < 300; i++) begin
        a = nxt(a, 8'(i * 13));
        b = nxt(b, 8'(i * 13) ^ ((i == flip) ? 8'h08 : 8'h00));
      end
      checks++;
      if (a == b) begin
        failures++;
        $display("FAIL model aliasing");
      end
      en = 1;
      for (int i = 0; i < 300; i++) begin
        din = 8'(i * 13) ^ ((i == flip) ? 8'h08 : 8'h00);
        @(negedge clk);
      end
      en = 0;
      checks++;
      if (sig !== b) begin
        failures++;
        $display("FAIL flipped stream sig %04h exp %04h", sig, b);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
