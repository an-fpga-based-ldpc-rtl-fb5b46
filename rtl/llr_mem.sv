// llr_mem - LLR_MEM, P banks of posterior LLRs.
//
// Variable v = k*P + i (block column k, position i inside the block) lives in
// bank i at address k, so one address reads the whole column group of a
// non-zero block in one cycle. Bank i is one (1,5,13) word wide; all banks
// share the read and the write address, each bank has its own write enable
// so the serial initialisation can fill one bank at a time while the node
// processors write all banks together. Simple dual port: one synchronous read
// (data one cycle after the address, old data on a same-address write) and
// one write per cycle.
//
// P banks addressed by block column follow the source design; the per-bank
// write enables are this design's choice.

module llr_mem
  import ldpc_pkg::*;
#(
  parameter int unsigned P  = 64,
  parameter int unsigned NB = 5468,   // block columns (depth)
  localparam int unsigned AW = $clog2(NB)
) (
  input  logic          clk,
  input  logic [P-1:0]  we,
  input  logic [AW-1:0] waddr,
  input  llr_t          wdata [P],
  input  logic [AW-1:0] raddr,
  output llr_t          rdata [P]
);

  for (genvar b = 0; b < P; b++) begin : g_bank
    llr_t bank [NB];
    always_ff @(posedge clk) begin
      if (we[b]) bank[waddr] <= wdata[b];
      rdata[b] <= bank[raddr];
    end
  end

endmodule
