// npu - one node processing unit (check-node lane) of the layered decoder.
//
// A lane handles one row of the current layer. It receives, one per cycle,
// the variable-to-check messages M of that row (already in row order), and
// after a constant delay returns the new check-to-variable message E for each
// of them, in the same order:
//
//   E_i = sign_i * Psi( sum_k Psi(|M_k|) - Psi(|M_i|) )
//
// which is the sum-product rule "Psi of the sum over all other nodes". The
// forward half computes Psi(|M|) with one psi_approx, accumulates the sum and
// the parity of the layer, and pushes the layer total into a small FIFO on
// the last node of the row. The per-node Psi value and hard bit wait in a
// delay buffer until the total is known; the backward half subtracts, runs a
// second psi_approx and attaches the sign.
//
// Sign rule. The decoder's hard decision is x = 1 for a non-negative LLR and
// the decision unit checks XOR(x) = s over every row. The lane enforces that
// same parity: with Q = s XOR (XOR of all x_k of the row), the message to node
// i must push x_i towards Q XOR x_i, so E_i is negative exactly when
// Q XOR x_i = 0. This is the syndrome factor (1 - 2 s_j) of side-information
// decoding written in the x convention of the decision unit.
//
// Interface: in_first/in_last mark the first and last node of a row, in_syn
// is the row's syndrome bit (it must be valid with every node of the row).
// Timing: E for a node presented in cycle t is on out_e in cycle t + LAT,
// LAT = MAX_DEG + 12. A row may have at most MAX_DEG nodes. Rows follow each
// other without idle cycles.
//
// The Psi-sum-Psi form, the two Psi evaluations and the constant latency
// follow the source design; the totals FIFO, the delay buffer depth and the
// exact sign formulation are this design's choices.

module npu
  import ldpc_pkg::*;
#(
  parameter int unsigned MAX_DEG = 16,
  localparam int unsigned LAT    = MAX_DEG + 12
) (
  input  logic clk,
  input  logic rst_n,
  input  logic in_valid,
  input  logic in_first,
  input  logic in_last,
  input  logic in_syn,
  input  llr_t in_m,
  output logic out_valid,
  output llr_t out_e
);

  localparam int unsigned ACCW  = MAGW + $clog2(MAX_DEG + 1);
  localparam int unsigned TDEP  = 2 ** $clog2(MAX_DEG + 1);
  localparam int unsigned TAW   = $clog2(TDEP);
  localparam int unsigned DB    = MAX_DEG;      // wait for the layer total
  localparam int unsigned FLAT  = 5;            // psi latency
  localparam int unsigned BSTG  = FLAT + DB;    // cycle of the backward stage

  // ---------------- control pipeline -----------------
  logic [LAT-1:0]  v_pipe;
  logic [BSTG-1:0] l_pipe;
  logic [FLAT-1:0] f_pipe, s_pipe, x_pipe;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      v_pipe <= '0;
      l_pipe <= '0;
      f_pipe <= '0;
      s_pipe <= '0;
      x_pipe <= '0;
    end else begin
      v_pipe <= {v_pipe[LAT-2:0], in_valid};
      l_pipe <= {l_pipe[BSTG-2:0], in_valid & in_last};
      f_pipe <= {f_pipe[FLAT-2:0], in_first};
      s_pipe <= {s_pipe[FLAT-2:0], in_syn};
      x_pipe <= {x_pipe[FLAT-2:0], ~in_m[W-1]};
    end
  end

  // ---------------- forward half -----------------
  mag_t psi_f;
  psi_approx u_psi_f (.clk(clk), .din(mag_of(in_m)), .dout(psi_f));

  wire f_valid = v_pipe[FLAT-1];
  wire f_first = f_pipe[FLAT-1];
  wire f_last  = l_pipe[FLAT-1];
  wire f_syn   = s_pipe[FLAT-1];
  wire f_x     = x_pipe[FLAT-1];

  logic [ACCW-1:0] acc_sum;
  logic            acc_par;
  logic [ACCW-1:0] sum_next;
  logic            par_next;
  always_comb begin
    sum_next = (f_first ? '0 : acc_sum) + ACCW'(psi_f);
    par_next = (f_first ? 1'b0 : acc_par) ^ f_x;
  end

  // layer totals FIFO
  typedef struct packed {
    logic [ACCW-1:0] sum;
    logic            q;     // syndrome XOR parity of all hard bits
  } total_t;
  total_t         tot_mem [TDEP];
  logic [TAW:0]   wp, rp;

  wire b_valid = v_pipe[BSTG-1];
  wire b_last  = l_pipe[BSTG-1];
  wire push    = f_valid & f_last;
  wire pop     = b_valid & b_last;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      acc_sum <= '0;
      acc_par <= 1'b0;
      wp      <= '0;
      rp      <= '0;
    end else begin
      if (f_valid) begin
        acc_sum <= sum_next;
        acc_par <= par_next;
      end
      if (push) wp <= wp + 1'b1;
      if (pop)  rp <= rp + 1'b1;
    end
  end
  always_ff @(posedge clk)
    if (push) tot_mem[wp[TAW-1:0]] <= '{sum: sum_next, q: par_next ^ f_syn};

  // per-node Psi(|M|) and hard bit wait DB cycles
  logic [MAGW:0] node_d;
  delay_buf #(.WIDTH(MAGW + 1), .DELAY(DB)) u_buf (
    .clk(clk), .rst_n(rst_n), .din({f_x, psi_f}), .dout(node_d));

  // ---------------- backward half -----------------
  total_t          tot;
  logic [ACCW:0]   diff;
  mag_t            diff_m;
  logic [FLAT:0]   sg_pipe;
  assign tot  = tot_mem[rp[TAW-1:0]];
  assign diff = {1'b0, tot.sum} - {{(ACCW + 1 - MAGW){1'b0}}, node_d[MAGW-1:0]};

  always_ff @(posedge clk) begin
    if (diff[ACCW])                       diff_m <= '0;        // rounding below zero
    else if (diff[ACCW-1:0] > ACCW'(MAG_MAX)) diff_m <= MAG_MAX;
    else                                  diff_m <= mag_t'(diff[ACCW-1:0]);
    sg_pipe <= {sg_pipe[FLAT-1:0], ~(tot.q ^ node_d[MAGW])};
  end

  mag_t psi_b;
  psi_approx u_psi_b (.clk(clk), .din(diff_m), .dout(psi_b));

  always_ff @(posedge clk) begin
    out_e <= sg_pipe[FLAT] ? -llr_t'({1'b0, psi_b}) : llr_t'({1'b0, psi_b});
  end
  assign out_valid = v_pipe[LAT-1];

  // the totals FIFO never overflows or runs dry when rows have <= MAX_DEG nodes
  a_no_overflow: assert property (@(posedge clk) disable iff (!rst_n)
    !(push && !pop && (wp - rp) == (TAW+1)'(TDEP)))
    else $error("npu: totals FIFO overflow");
  a_total_ready: assert property (@(posedge clk) disable iff (!rst_n)
    !(b_valid && wp == rp))
    else $error("npu: row longer than MAX_DEG");

endmodule
