// tb_ccc_mac: exhaustive test of the adder with concurrent consistency check.
// For every pair of 8-bit inputs, with the check on the result must be the
// 9-bit sum halved (never an overflow); with it off, the sum modulo 256 and
// an overflow flag exactly when the sum exceeds 255.
module tb_ccc_mac;
  logic ccc_en;
  logic [7:0] pre, prob, acc;
  logic ovf;
  int checks = 0, failures = 0;

  ccc_mac #(.W(8)) dut (.*);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int c = 0; c < 2; c++) begin
      for (int a = 0; a < 256; a++) begin
        for (int b = 0; b < 256; b++) begin
          int s;
          ccc_en = c[0]; pre = 8'(a); prob = 8'(b);
          #1;
          s = a + b;
          checks++;
          if (c == 1) begin
            if (acc !== 8'(s / 2) || ovf !== 1'b0) begin
              failures++;
              if (failures < 10) $display("FAIL ccc %0d+%0d -> %0d ovf %0b", a, b, acc, ovf);
            end
          end else begin
            if (acc !== 8'(s % 256) || ovf !== (s > 255)) begin
              failures++;
              if (failures < 10) $display("FAIL raw %0d+%0d -> %0d ovf %0b", a, b, acc, ovf);
            end
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
