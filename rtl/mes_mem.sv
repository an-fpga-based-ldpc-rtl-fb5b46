// mes_mem - Mes_MEM, P banks of check-to-variable messages.
//
// One message per edge of the expanded matrix. The messages of non-zero
// block n sit at address n, in column order (bank i = column i of the
// block), so they are read and written "one by one" with the block counter.
// Layered decoding keeps only these messages; variable-to-check messages are
// recomputed on the fly. This is the largest memory of the decoder.
// Simple dual port: one synchronous read, one write per cycle, all banks
// sharing the addresses.
//
// P banks read one by one in block order follow the source design; storing
// the messages in column order (rotated on the way in and out) is this
// design's choice.

module mes_mem
  import ldpc_pkg::*;
#(
  parameter int unsigned P  = 64,
  parameter int unsigned WB = 19617,  // non-zero blocks (depth)
  localparam int unsigned AW = $clog2(WB)
) (
  input  logic          clk,
  input  logic          we,
  input  logic [AW-1:0] waddr,
  input  llr_t          wdata [P],
  input  logic [AW-1:0] raddr,
  output llr_t          rdata [P]
);

  for (genvar b = 0; b < P; b++) begin : g_bank
    llr_t bank [WB];
    always_ff @(posedge clk) begin
      if (we) bank[waddr] <= wdata[b];
      rdata[b] <= bank[raddr];
    end
  end

endmodule
