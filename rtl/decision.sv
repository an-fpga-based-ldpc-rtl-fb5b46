// decision - syndrome check after each decoding iteration.
//
// The unit walks the compressed parity-check matrix block by block. For every
// block it reads the sign bits of the block's column group from the LLR
// memory, inverts them to hard bits (x = 1 for a non-negative LLR), brings
// them into row order with the block offset and XORs them into a P-bit row
// accumulator. At the last block of a layer the accumulator is compared with
// that layer's syndrome word. The first layer that differs ends the check at
// once: the result is DEC_RETRY, or DEC_GIVE_UP when iters_done has reached
// max_iter. When every layer matches the result is DEC_PASS.
//
// Timing: start is a one-cycle pulse; matrix, LLR and syndrome reads each
// have one cycle of latency and one block is checked per cycle, so a full
// pass takes n_blocks + 3 cycles and a failing pass ends 3 cycles after the
// first block of the failing layer was requested. done pulses for one cycle
// with result valid; layers_ok counts the layers that matched.
//
// The NOT-and-XOR check against the syndrome, the stop at the first mismatch
// and the iteration limit follow the source design; the separate pass after
// each iteration (rather than overlapping it with node processing) and the
// three-way result encoding are this design's choices.

module decision
  import ldpc_pkg::*;
#(
  parameter int unsigned P  = 64,
  parameter int unsigned WB = 19617,
  parameter int unsigned NB = 5468,
  parameter int unsigned MB = 4840,
  parameter int unsigned IW = 8,      // iteration counter width
  localparam int unsigned BAW = $clog2(WB),
  localparam int unsigned CW  = $clog2(NB),
  localparam int unsigned LW  = $clog2(MB),
  localparam int unsigned OW  = (P > 1) ? $clog2(P) : 1
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           start,
  input  logic [BAW:0]   n_blocks,
  input  logic [IW-1:0]  iters_done,
  input  logic [IW-1:0]  max_iter,
  // PCM_MEM read port
  output logic [BAW-1:0] pcm_raddr,
  input  logic           pcm_last,
  input  logic [CW-1:0]  pcm_col,
  input  logic [OW-1:0]  pcm_off,
  // LLR_MEM read port (sign bits of all banks)
  output logic [CW-1:0]  llr_raddr,
  input  logic [P-1:0]   llr_sign,
  // Syn_MEM read port
  output logic [LW-1:0]  syn_raddr,
  input  logic [P-1:0]   syn_rdata,
  output logic           done,
  output dec_result_t    result,
  output logic [LW:0]    layers_ok
);

  logic           running;
  logic [BAW:0]   cnt;
  logic [LW-1:0]  layer;
  logic           v1, v2, first1, first2, last2, fin1, fin2;
  logic [OW-1:0]  off2;
  logic [P-1:0]   acc;

  assign pcm_raddr = cnt[BAW-1:0];
  assign llr_raddr = pcm_col;   // data of the word read last cycle
  assign syn_raddr = layer;
  wire issue = running && (cnt < n_blocks);

  // hard bits of the block, in row order
  logic [0:0] x_col [P], x_row [P];
  always_comb for (int i = 0; i < P; i++) x_col[i] = ~llr_sign[i];
  qc_rotate #(.P(P), .WIDTH(1), .INVERSE(1'b0)) u_route (.din(x_col), .off(off2), .dout(x_row));

  logic [P-1:0] acc_next;
  always_comb begin
    for (int i = 0; i < P; i++) acc_next[i] = (first2 ? 1'b0 : acc[i]) ^ x_row[i][0];
  end
  wire mismatch = v2 && last2 && (acc_next != syn_rdata);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      running   <= 1'b0;
      cnt       <= '0;
      layer     <= '0;
      v1        <= 1'b0;
      v2        <= 1'b0;
      first1    <= 1'b1;
      first2    <= 1'b1;
      last2     <= 1'b0;
      fin1      <= 1'b0;
      fin2      <= 1'b0;
      off2      <= '0;
      acc       <= '0;
      done      <= 1'b0;
      result    <= DEC_NONE;
      layers_ok <= '0;
    end else begin
      done <= 1'b0;
      if (start) begin
        running   <= 1'b1;
        cnt       <= '0;
        layer     <= '0;
        first1    <= 1'b1;
        v1        <= 1'b0;
        v2        <= 1'b0;
        layers_ok <= '0;
        result    <= DEC_NONE;
      end else begin
        // stage 0: request matrix word
        v1   <= issue;
        fin1 <= issue && (cnt == n_blocks - 1'b1);
        if (issue) cnt <= cnt + 1'b1;
        // stage 1: request LLR signs and syndrome
        v2 <= v1 && running;
        if (v1) begin
          off2      <= pcm_off;
          first2    <= first1;
          last2     <= pcm_last;
          fin2      <= fin1;
          first1    <= pcm_last;
          if (pcm_last) layer <= layer + 1'b1;
        end
        // stage 2: accumulate and compare
        if (v2) begin
          acc <= acc_next;
          if (last2 && !mismatch) layers_ok <= layers_ok + 1'b1;
          if (mismatch) begin
            running <= 1'b0;
            v1      <= 1'b0;
            v2      <= 1'b0;
            done    <= 1'b1;
            result  <= (iters_done >= max_iter) ? DEC_GIVE_UP : DEC_RETRY;
          end else if (fin2) begin
            running <= 1'b0;
            done    <= 1'b1;
            result  <= DEC_PASS;
          end
        end
      end
    end
  end

endmodule
