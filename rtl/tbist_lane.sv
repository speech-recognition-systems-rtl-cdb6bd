// tbist_lane: the part of the transparent BIST that sits next to one cache
// memory. It follows the broadcast control bundle of tbist_ctrl:
//  - a_load: the first read of a march element is on rdata; the lane recovers
//    the word's original value a (rdata, or ~rdata when the element expects
//    the inverse) and keeps it for the element's writes;
//  - mem_we: wdata is a or ~a (w_inv), so the test only ever writes values
//    derived from the memory's own contents and ends with them restored;
//  - rd_misr: rdata (inverted if rd_inv, which the signature prediction pass
//    uses to imitate the reads of the test) is compacted in one MISR;
//  - sig_save: the prediction pass is over: its signature is stored and the
//    same MISR is cleared for the test pass;
//  - compare: the test signature is compared with the prediction; fail is
//    sticky until the next sig_save.
// wdata is combinational from rdata in the a_load cycle (the first write of an
// element follows its read directly). Signature prediction, a single MISR for
// both passes and the final comparison follow the paper; the register
// holding a is this design's choice.
module tbist_lane
  import srs_pkg::*;
#(
  parameter int unsigned DW = 8,
  parameter int unsigned SW = 16
) (
  input  logic          clk,
  input  logic          rst_n,
  input  bist_ctl_t     ctl,
  input  logic [DW-1:0] rdata,
  output logic [DW-1:0] wdata,
  output logic [SW-1:0] sig_pred,
  output logic [SW-1:0] sig_test,
  output logic          fail
);

  logic [DW-1:0] a_reg, a_eff, misr_din;

  always_comb begin
    a_eff    = ctl.a_load ? (rdata ^ {DW{ctl.a_inv}}) : a_reg;
    wdata    = a_eff ^ {DW{ctl.w_inv}};
    misr_din = rdata ^ {DW{ctl.rd_inv}};
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      a_reg    <= '0;
      sig_pred <= '0;
      fail     <= 1'b0;
    end else begin
      if (ctl.a_load)   a_reg <= a_eff;
      if (ctl.sig_save) begin
        sig_pred <= sig_test;
        fail     <= 1'b0;
      end
      if (ctl.compare)  fail <= (sig_test != sig_pred);
    end
  end

  misr #(.W(SW), .DW(DW)) u_misr (
    .clk   (clk),
    .rst_n (rst_n),
    .clear (ctl.sig_save),
    .en    (ctl.rd_misr),
    .din   (misr_din),
    .sig   (sig_test)
  );

endmodule
