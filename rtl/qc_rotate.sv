// qc_rotate - cyclic routing network between column order and row order.
//
// In a quasi-cyclic block with offset o, row r of the block meets column
// (r + o) mod P. The LLR and message memories hold values in column order
// (bank i = column i of the block); the check-node lanes work in row order.
// INVERSE = 0 rearranges column order into row order:  dout[r] = din[(r+o) mod P].
// INVERSE = 1 restores column order from row order:    dout[c] = din[(c-o) mod P].
// Combinational; the enclosing pipeline registers the result. The parallelism
// equals the expansion factor (p = q), so one P-lane rotation covers a block.
//
// Rotation by the block offset before and after the node processors follows
// the source design; the direction convention is this design's choice.

module qc_rotate #(
  parameter int unsigned P       = 64,
  parameter int unsigned WIDTH   = 19,
  parameter bit          INVERSE = 1'b0,
  localparam int unsigned OW     = (P > 1) ? $clog2(P) : 1
) (
  input  logic [WIDTH-1:0] din  [P],
  input  logic [OW-1:0]    off,
  output logic [WIDTH-1:0] dout [P]
);

  always_comb begin
    for (int r = 0; r < P; r++) begin
      int unsigned src;
      if (!INVERSE) src = (r + int'(off)) % P;
      else          src = (r + P - int'(off)) % P;
      dout[r] = din[src];
    end
  end

endmodule
