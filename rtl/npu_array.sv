// npu_array - the P parallel node processing units with their datapath.
//
// Each cycle the array takes one non-zero block of the parity-check matrix:
// the P LLRs of the block's column group (llr_rd, column order, bank i =
// column i) and the P stored check-to-variable messages of the block (e_rd,
// also column order). It then runs the five steps of the layered update:
//   (a) M = LLR - E_old                      column order   (stage A)
//   (b) M rearranged into row order by the block offset     (stage B)
//   (c) P npu lanes compute E_new            row order
//   (d) E_new rearranged back into column order             (stage C)
//   (e) LLR_new = M + E_new                  column order   (stage D)
// and hands back LLR_new and E_new with the tag it was given (the memory
// addresses), to be written over the values that were read.
//
// The delay from input to write-back is the constant LAT = MAX_DEG + 16
// cycles, for every block and every layer, so reads and writes never collide
// as long as two uses of the same block column are at least LAT + 2 blocks
// apart in processing order (a rule on how the matrix is built, as in the
// source design). On the first iteration the stored messages are not yet
// valid and in_first_iter forces E_old to zero, which saves clearing the
// message memory. The syndrome word of a layer (one bit per row) is taken
// with the first block of the layer and held for the rest of it.
module npu_array
  import ldpc_pkg::*;
#(
  parameter int unsigned P       = 64,
  parameter int unsigned MAX_DEG = 16,
  parameter int unsigned TAGW    = 8,
  localparam int unsigned OW     = (P > 1) ? $clog2(P) : 1
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            in_valid,
  input  logic            in_first,       // first block of a layer
  input  logic            in_last,        // last block of a layer
  input  logic            in_first_iter,  // stored messages not valid yet
  input  logic [OW-1:0]   in_off,         // cyclic offset of the block
  input  logic [TAGW-1:0] in_tag,
  input  llr_t            llr_rd [P],
  input  llr_t            e_rd   [P],
  input  logic [P-1:0]    syn_rd,         // valid with in_first
  output logic            out_valid,
  output logic [TAGW-1:0] out_tag,
  output llr_t            llr_wr [P],
  output llr_t            e_wr   [P]
);

  localparam int unsigned NLAT = MAX_DEG + 12;  // npu latency

  // ---- stage A: M = LLR - E ----
  llr_t         m_col [P];
  logic [P-1:0] syn_hold, syn_a;
  logic [OW-1:0] off_a;
  logic [TAGW-1:0] tag_a;
  logic         v_a, f_a, l_a;
  always_ff @(posedge clk) begin
    for (int i = 0; i < P; i++)
      m_col[i] <= sat_llr((W+1)'(llr_rd[i]) - (in_first_iter ? '0 : (W+1)'(e_rd[i])));
    syn_a <= in_first ? syn_rd : syn_hold;
    off_a <= in_off;
    tag_a <= in_tag;
    f_a   <= in_first;
    l_a   <= in_last;
  end
  always_ff @(posedge clk) if (in_valid && in_first) syn_hold <= syn_rd;

  // ---- stage B: column order -> row order ----
  logic [W-1:0] m_col_v [P], m_row_c [P];
  always_comb for (int i = 0; i < P; i++) m_col_v[i] = m_col[i];
  qc_rotate #(.P(P), .WIDTH(W), .INVERSE(1'b0)) u_route_fwd (
    .din(m_col_v), .off(off_a), .dout(m_row_c));

  llr_t         m_row [P];
  logic [P-1:0] syn_b;
  logic         v_b, f_b, l_b;
  always_ff @(posedge clk) begin
    for (int i = 0; i < P; i++) m_row[i] <= llr_t'(m_row_c[i]);
    syn_b <= syn_a;
    f_b   <= f_a;
    l_b   <= l_a;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      v_a <= 1'b0;
      v_b <= 1'b0;
    end else begin
      v_a <= in_valid;
      v_b <= v_a;
    end
  end

  // ---- stage (c): P lanes ----
  llr_t         e_row [P];
  logic [P-1:0] lane_v;
  for (genvar g = 0; g < P; g++) begin : g_lane
    npu #(.MAX_DEG(MAX_DEG)) u_npu (
      .clk(clk), .rst_n(rst_n),
      .in_valid(v_b), .in_first(f_b), .in_last(l_b), .in_syn(syn_b[g]),
      .in_m(m_row[g]),
      .out_valid(lane_v[g]), .out_e(e_row[g]));
  end

  // ---- side path: M (column order), offset and tag wait for the lanes ----
  logic [P*W-1:0] m_flat, m_flat_d;
  always_comb for (int i = 0; i < P; i++) m_flat[i*W +: W] = m_col[i];
  delay_buf #(.WIDTH(P*W), .DELAY(NLAT + 2)) u_mbuf (
    .clk(clk), .rst_n(rst_n), .din(m_flat), .dout(m_flat_d));

  logic [OW+TAGW-1:0] ot_d;
  delay_buf #(.WIDTH(OW + TAGW), .DELAY(NLAT + 1)) u_tbuf (
    .clk(clk), .rst_n(rst_n), .din({off_a, tag_a}), .dout(ot_d));

  // ---- stage C: row order -> column order ----
  logic [W-1:0] e_row_v [P], e_col_c [P];
  always_comb for (int i = 0; i < P; i++) e_row_v[i] = e_row[i];
  qc_rotate #(.P(P), .WIDTH(W), .INVERSE(1'b1)) u_route_inv (
    .din(e_row_v), .off(ot_d[OW+TAGW-1:TAGW]), .dout(e_col_c));

  llr_t            e_col [P];
  logic [TAGW-1:0] tag_c;
  logic            v_c;
  always_ff @(posedge clk) begin
    for (int i = 0; i < P; i++) e_col[i] <= llr_t'(e_col_c[i]);
    tag_c <= ot_d[TAGW-1:0];
  end

  // ---- stage D: LLR = M + E ----
  always_ff @(posedge clk) begin
    for (int i = 0; i < P; i++) begin
      llr_wr[i] <= sat_llr((W+1)'(llr_t'(m_flat_d[i*W +: W])) + (W+1)'(e_col[i]));
      e_wr[i]   <= e_col[i];
    end
    out_tag <= tag_c;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      v_c       <= 1'b0;
      out_valid <= 1'b0;
    end else begin
      v_c       <= &lane_v;
      out_valid <= v_c;
    end
  end

  a_lanes_agree: assert property (@(posedge clk) disable iff (!rst_n)
    (&lane_v) == (|lane_v)) else $error("npu_array: lanes out of step");

endmodule
