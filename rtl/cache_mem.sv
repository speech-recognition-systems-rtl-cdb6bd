// cache_mem: local cache memory of one HMM state. Holds, for every code label
// (observation), the trained score of the transition this state takes on that
// label. Single-port synchronous RAM, one access per cycle: a read issued with
// en=1, we=0 in cycle k has its data on rdata in cycle k+1; a write (en=1,
// we=1) updates the addressed byte at the clock edge and leaves rdata
// unchanged. One byte per entry and 128 entries follow the example system; the
// single-port organisation and read latency are this design's choice. The
// contents have no reset: they are loaded by the host after power-up.
module cache_mem #(
  parameter int unsigned DEPTH = 128,
  parameter int unsigned DW    = 8,
  parameter int unsigned AW    = $clog2(DEPTH)
) (
  input  logic          clk,
  input  logic          en,
  input  logic          we,
  input  logic [AW-1:0] addr,
  input  logic [DW-1:0] wdata,
  output logic [DW-1:0] rdata
);

  logic [DW-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (en) begin
      if (we) mem[addr] <= wdata;
      else    rdata     <= mem[addr];
    end
  end

endmodule
