// delay_buf - fixed delay line built as a circular RAM buffer.
//
// Holds the per-node data the pipeline must keep while a check-node layer is
// still being accumulated (the "Buffer" of the iteration timing): a word
// written in cycle t appears on dout in cycle t + DELAY. A single pointer
// walks a RAM of DELAY-1 words; each cycle the oldest word is read out and
// replaced by the new one, so a block RAM or LUT RAM can hold it instead of a
// chain of registers. Only the pointer is reset; the data words carry no
// valid bit, the user keeps valid flags in its own reset pipeline.
// DELAY must be at least 2.
//
// The source design names the buffer but not its structure; the circular RAM
// is this design's choice.

module delay_buf #(
  parameter int unsigned WIDTH = 19,
  parameter int unsigned DELAY = 4
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic [WIDTH-1:0] din,
  output logic [WIDTH-1:0] dout
);

  localparam int unsigned DEPTH = DELAY - 1;
  localparam int unsigned AW    = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  logic [WIDTH-1:0] mem [DEPTH];
  logic [AW-1:0]    ptr;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                        ptr <= '0;
    else if (ptr == AW'(DEPTH - 1))    ptr <= '0;
    else                               ptr <= ptr + 1'b1;
  end

  always_ff @(posedge clk) begin
    dout     <= mem[ptr];
    mem[ptr] <= din;
  end

  initial assert (DELAY >= 2) else $error("delay_buf: DELAY must be >= 2");

endmodule
