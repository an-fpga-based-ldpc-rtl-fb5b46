// psi_approx - Psi(x) = -ln(tanh(|x|/2)) by a piecewise second-order polynomial.
//
// Psi is the non-linear function of the sum-product check-node update. It is
// even and positive, so the unit takes an 18-bit magnitude m in units of 2^-13
// (the magnitude part of the (1,5,13) format) and returns an 18-bit magnitude
// in the same units. The evaluation follows the three-multiplier structure of
// the source design: mult0 squares the input, mult1 scales the square by a,
// mult2 scales the input by b, a subtractor forms c - b*x and an adder joins
// the two paths. Operands are at most 25 x 18 bits, matching one DSP slice per
// multiplier.
//
// Segmentation (this design's choice, the source gives no table): the segment
// is the octave of m (position e of its leading one) and the polynomial is in
// the normalised variable u = m / 2^e in [1,2), held as an unsigned 1.17 word.
// The coefficients come from ldpc_pkg::psi_coef. Psi(0) is infinite; an input
// of 0 is evaluated as one LSB (Psi = 9.70), which keeps the function
// monotonic and keeps check messages well inside the LLR range, so that a
// saturated LLR cannot wipe out the channel value when a message is
// subtracted again. Results are clamped to [0, 2^18-1].
//
// Timing: fully pipelined, one input per cycle, the result appears exactly
// 5 clock cycles after the input (the 5-cycle latency of the source design).
// Stage 1 selects the segment, stage 2 runs mult0 and mult2, stage 3 runs
// mult1 and the subtractor, stage 4 the adder, stage 5 the width adjustment.
module psi_approx
  import ldpc_pkg::*;
(
  input  logic clk,
  input  mag_t din,
  output mag_t dout
);

  localparam int unsigned UW = 18;  // u in 1.17

  function automatic logic [4:0] msb_pos(input mag_t v);
    logic [4:0] p;
    p = '0;
    for (int i = 0; i < MAGW; i++)
      if (v[i]) p = 5'(i);
    return p;
  endfunction

  // stage 1: segment select and normalisation
  logic [UW-1:0] u1;
  psi_coef_t     k1;
  always_ff @(posedge clk) begin
    logic [4:0] e;
    mag_t       d;
    d  = (din == '0) ? mag_t'(1) : din;
    e  = msb_pos(d);
    u1 <= UW'({d, 17'b0} >> e);     // d << (17 - e)
    k1 <= psi_coef(e);
  end

  // stage 2: mult0 (u*u) and mult2 (bn*u)
  logic [UW-1:0]        u2_2;
  logic signed [43:0]   pb2;
  coef_t                a2, c2;
  always_ff @(posedge clk) begin
    logic [2*UW-1:0] sq;
    sq   = u1 * u1;
    u2_2 <= sq[2*UW-1:18];                          // u^2 as 2.16
    pb2  <= 44'(k1.bn) * $signed({26'b0, u1});
    a2   <= k1.a;
    c2   <= k1.c;
  end

  // stage 3: mult1 (a*u^2) and sub (c - bn*u)
  logic signed [43:0] pa3;
  logic signed [27:0] s3;
  always_ff @(posedge clk) begin
    logic signed [43:0] pbs;
    pa3 <= 44'(a2) * $signed({26'b0, u2_2});
    pbs = pb2 >>> (PSI_FB + 4);
    s3  <= 28'(c2) - 28'(pbs);
  end

  // stage 4: add
  logic signed [27:0] y4;
  always_ff @(posedge clk) begin
    logic signed [43:0] pas;
    pas = pa3 >>> (PSI_FA + 3);
    y4 <= s3 + 28'(pas);
  end

  // stage 5: width adjustment (clamp)
  always_ff @(posedge clk) begin
    if (y4 < 0)                      dout <= '0;
    else if (y4 > 28'(MAG_MAX))           dout <= MAG_MAX;
    else                                  dout <= mag_t'(y4);
  end

endmodule
