// syn_mem - Syn_MEM, the received syndrome.
//
// One P-bit word per layer (block row): bit r is the syndrome bit of row r of
// that layer, so the node processors get the bits of a whole layer in one
// read, and the layers are read one by one. True dual port as in the source
// design, since both the node processors and the decision unit read it:
// each port has its own address, write enable and synchronous read data.
// When both ports write the same address in one cycle, port B wins.
module syn_mem #(
  parameter int unsigned P  = 64,
  parameter int unsigned MB = 4840,   // layers (depth)
  localparam int unsigned AW = $clog2(MB)
) (
  input  logic          clk,
  input  logic          we_a,
  input  logic [AW-1:0] addr_a,
  input  logic [P-1:0]  wdata_a,
  output logic [P-1:0]  rdata_a,
  input  logic          we_b,
  input  logic [AW-1:0] addr_b,
  input  logic [P-1:0]  wdata_b,
  output logic [P-1:0]  rdata_b
);

  logic [P-1:0] mem [MB];

  always_ff @(posedge clk) begin
    if (we_a) mem[addr_a] <= wdata_a;
    if (we_b) mem[addr_b] <= wdata_b;
    rdata_a <= mem[addr_a];
    rdata_b <= mem[addr_b];
  end

endmodule
