// pcm_mem - PCM_MEM, the compressed parity-check matrix.
//
// One word per non-zero block of the base matrix, in processing order (layer
// by layer, and inside a layer in the order the blocks are to be read). A
// word holds the block's column in the base matrix, its cyclic offset and a
// flag marking the last block of a layer. Storing only column and offset of
// the non-zero blocks follows the source design; the end-of-layer flag is this
// design's way of telling layer boundaries, which the source does not detail.
// Because the blocks are visited in storage order the read address is a plain
// counter. One write port (loading) and one synchronous read port (data one
// cycle after the address), as in a single block RAM.
module pcm_mem #(
  parameter int unsigned WB = 19617,  // non-zero blocks (depth)
  parameter int unsigned CW = 13,     // base-matrix column index width
  parameter int unsigned OW = 6,      // offset width, log2(q)
  localparam int unsigned AW = $clog2(WB)
) (
  input  logic          clk,
  input  logic          we,
  input  logic [AW-1:0] waddr,
  input  logic          wlast,
  input  logic [CW-1:0] wcol,
  input  logic [OW-1:0] woff,
  input  logic [AW-1:0] raddr,
  output logic          rlast,
  output logic [CW-1:0] rcol,
  output logic [OW-1:0] roff
);

  typedef struct packed {
    logic          last;
    logic [CW-1:0] col;
    logic [OW-1:0] off;
  } entry_t;

  entry_t mem [WB];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= '{last: wlast, col: wcol, off: woff};
    {rlast, rcol, roff} <= mem[raddr];
  end

endmodule
