// llr_ini - initial LLRs, LLR = ln(P0 / P1), written into the LLR banks.
//
// The unit takes one pair of probabilities per cycle (p_valid, p0, p1,
// unsigned 0.16 fixed point, 0 read as 2^-16) and produces the (1,5,13)
// channel LLR ln(p0/p1), saturated to the word range. Variables arrive in
// order v = 0, 1, 2, ...; variable v is written to bank v mod P at address
// v / P (a bank counter and an address counter, so no divider). clear resets
// both counters for a new frame; p_valid must be low in the clear cycle.
//
// The source design chains vendor floating-point cores (two fixed-to-float
// converters, a divider, a logarithm, a float-to-fixed converter). Those
// cores are not available here, so this unit computes the same function with
// a short fixed-point pipeline of the same shape:
//   stage 1 (to float):   p = 2^e * (1 + f), e = leading-one position
//   stage 2 (log):        log2 p = (e - 16) + log2(1 + f), the mantissa term
//                         by linear interpolation in a 17-point table
//                         T[j] = round(2^16 * log2(1 + j/16))
//   stage 3 (divide):     log2(p0/p1) = log2 p0 - log2 p1
//   stage 4 (to fixed):   LLR = ln2 * log2(p0/p1), rounded to 2^-13, saturated
// The LLR is written 4 cycles after the pair is presented. Error of the
// logarithm stays below 2^-10 of an LLR unit.
module llr_ini
  import ldpc_pkg::*;
#(
  parameter int unsigned P  = 64,
  parameter int unsigned NB = 5468,
  localparam int unsigned AW = $clog2(NB),
  localparam int unsigned PW = 16
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          clear,
  input  logic          p_valid,
  input  logic [PW-1:0] p0,
  input  logic [PW-1:0] p1,
  output logic [P-1:0]  we,       // one-hot bank enable
  output logic [AW-1:0] waddr,
  output llr_t          wdata
);

  localparam int unsigned BW = (P > 1) ? $clog2(P) : 1;
  localparam logic [16:0] LN2_Q16 = 17'd45426;   // round(2^16 * ln 2)

  function automatic logic [16:0] log_tab(input logic [4:0] j);
    case (j)
      5'd0:  return 17'd0;      5'd1:  return 17'd5732;   5'd2:  return 17'd11136;
      5'd3:  return 17'd16248;  5'd4:  return 17'd21098;  5'd5:  return 17'd25711;
      5'd6:  return 17'd30109;  5'd7:  return 17'd34312;  5'd8:  return 17'd38336;
      5'd9:  return 17'd42196;  5'd10: return 17'd45904;  5'd11: return 17'd49472;
      5'd12: return 17'd52911;  5'd13: return 17'd56229;  5'd14: return 17'd59434;
      5'd15: return 17'd62534;  default: return 17'd65536;
    endcase
  endfunction

  typedef struct packed {
    logic [3:0]  e;   // exponent, 0..15
    logic [14:0] f;   // mantissa fraction
  } flt_t;

  function automatic flt_t to_float(input logic [PW-1:0] p);
    flt_t r;
    logic [PW-1:0] n;
    r.e = '0;
    for (int i = 0; i < PW; i++) if (p[i]) r.e = 4'(i);
    n   = p << (4'd15 - r.e);
    r.f = n[14:0];
    return r;
  endfunction

  // log2 of a float in 2^-16 units, signed: (e - 16) * 2^16 + log2(1 + f)
  function automatic logic signed [21:0] log2_q16(input flt_t x);
    logic [4:0]  j;
    logic [10:0] fr;
    logic [16:0] t0, t1;
    logic [27:0] interp;
    j      = {1'b0, x.f[14:11]};
    fr     = x.f[10:0];
    t0     = log_tab(j);
    t1     = log_tab(j + 5'd1);
    interp = 28'(t1 - t0) * 28'(fr);
    return (22'(signed'({1'b0, x.e})) - 22'sd16) * 22'sd65536
           + 22'(t0) + 22'(interp >> 11);
  endfunction

  // stage 1
  flt_t f0_1, f1_1;
  logic v1, v2, v3, v4;
  always_ff @(posedge clk) begin
    f0_1 <= to_float(p0);
    f1_1 <= to_float(p1);
  end
  // stage 2
  logic signed [21:0] l0_2, l1_2;
  always_ff @(posedge clk) begin
    l0_2 <= log2_q16(f0_1);
    l1_2 <= log2_q16(f1_1);
  end
  // stage 3
  logic signed [22:0] d3;
  always_ff @(posedge clk) d3 <= 23'(l0_2) - 23'(l1_2);
  // stage 4
  logic signed [40:0] prod;
  logic signed [40:0] llr_q13;
  always_comb begin
    prod    = 41'(d3) * 41'(signed'({1'b0, LN2_Q16}));
    llr_q13 = (prod + 41'sd262144) >>> 19;           // 2^-32 -> 2^-13, rounded
  end

  logic [BW-1:0] bank_cnt;
  logic [AW-1:0] addr_cnt;
  logic [BW-1:0] bank4;
  logic [AW-1:0] addr4;
  logic [BW-1:0] bank_q [3];
  logic [AW-1:0] addr_q [3];

  always_ff @(posedge clk) begin
    if (llr_q13 > 41'(LLR_MAX))      wdata <= LLR_MAX;
    else if (llr_q13 < 41'(LLR_MIN)) wdata <= LLR_MIN;
    else                             wdata <= llr_t'(llr_q13);
    bank_q[0] <= bank_cnt;  addr_q[0] <= addr_cnt;
    bank_q[1] <= bank_q[0]; addr_q[1] <= addr_q[0];
    bank_q[2] <= bank_q[1]; addr_q[2] <= addr_q[1];
    bank4     <= bank_q[2]; addr4     <= addr_q[2];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      v1 <= 1'b0; v2 <= 1'b0; v3 <= 1'b0; v4 <= 1'b0;
      bank_cnt <= '0;
      addr_cnt <= '0;
    end else begin
      v1 <= p_valid; v2 <= v1; v3 <= v2; v4 <= v3;
      if (clear) begin
        bank_cnt <= '0;
        addr_cnt <= '0;
      end else if (p_valid) begin
        if (bank_cnt == BW'(P - 1)) begin
          bank_cnt <= '0;
          addr_cnt <= addr_cnt + 1'b1;
        end else begin
          bank_cnt <= bank_cnt + 1'b1;
        end
      end
    end
  end

  always_comb begin
    we    = '0;
    we[bank4] = v4;
    waddr = addr4;
  end

endmodule
