// misr: multiple-input signature register, the output response compactor of
// the transparent BIST. Every cycle with en=1 the register shifts left once
// as a Galois LFSR with feedback polynomial POLY and the DW-bit input word is
// XORed into its low bits. clear (synchronous, priority over en) sets the
// signature to zero. The paper names the MISR; its width (16 bits) and
// polynomial (x^16+x^12+x^5+1) are this design's choice.
module misr #(
  parameter int unsigned     W    = 16,
  parameter int unsigned     DW   = 8,
  parameter logic [W-1:0]    POLY = 16'h1021
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          clear,
  input  logic          en,
  input  logic [DW-1:0] din,
  output logic [W-1:0]  sig
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)      sig <= '0;
    else if (clear)  sig <= '0;
    else if (en)     sig <= {sig[W-2:0], 1'b0} ^ (sig[W-1] ? POLY : '0) ^ W'(din);
  end

endmodule
