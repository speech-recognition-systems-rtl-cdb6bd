// ccc_mac: adder of one HMM state with the concurrent consistency check (CCC).
// The cache memory's transition score is added to the state's partial score
// (pre-accumulator) in a W+1-bit adder. With the CCC on, the sum is shifted
// right by one bit before it is written back to the accumulator, so the
// carry is kept and the 8-bit accumulator can never overflow, while the order
// of the partial scores of the states is preserved. With the CCC off the
// plain W-bit sum wraps and ovf reports the lost carry (the unprotected
// datapath the CCC is measured against). Purely combinational. The shift after
// every MAC comes from the paper; the ovf flag is this design's addition.
module ccc_mac #(
  parameter int unsigned W = 8
) (
  input  logic         ccc_en,  // 1: shift right after the add (CCC on)
  input  logic [W-1:0] pre,     // partial score from the pre-accumulator
  input  logic [W-1:0] prob,    // transition score from the cache memory
  output logic [W-1:0] acc,     // new accumulator value
  output logic         ovf      // CCC off and the sum did not fit in W bits
);

  logic [W:0] sum;

  always_comb begin
    sum = {1'b0, pre} + {1'b0, prob};
    if (ccc_en) begin
      acc = sum[W:1];
      ovf = 1'b0;
    end else begin
      acc = sum[W-1:0];
      ovf = sum[W];
    end
  end

endmodule
