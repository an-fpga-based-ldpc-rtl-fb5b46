// ldpc_ctrl - sequencer of the decoder.
//
// Runs one decoding: iterations of the layered update, each followed by a
// decision pass, until the decision passes (then the bit sequence is read
// out) or gives up at the iteration limit.
//
// During an iteration the PCM_MEM address is a plain counter: one non-zero
// block is requested per cycle with no idle cycle between nodes or layers.
// One cycle later the matrix word gives the LLR bank address (block column)
// and the end-of-layer flag; the message address is the counter delayed by
// one cycle, and the syndrome address is the running layer number. One more
// cycle later the LLRs, messages and syndrome word reach the node processors
// together with first/last/offset and the write-back tag {column, message
// address}. After the last block the sequencer waits until every block in
// flight has been written back (counted by an in-flight counter), then starts
// the decision unit. The first iteration tells the node processors to treat
// the stored messages as zero.
//
// Phases: IDLE -> ITER -> DRAIN -> DECIDE -> (ITER | OUTPUT | DONE) -> DONE.
// start is accepted in IDLE; done pulses for one cycle in DONE with success
// and iters (iterations run) valid until the next start.
//
// The counter-driven matrix walk and the gap-free issue follow the source
// design; the state machine, the in-flight counter and the first-iteration
// flag are this design's choices.

module ldpc_ctrl #(
  parameter int unsigned P  = 64,
  parameter int unsigned WB = 19617,
  parameter int unsigned NB = 5468,
  parameter int unsigned MB = 4840,
  parameter int unsigned IW = 8,
  localparam int unsigned BAW = $clog2(WB),
  localparam int unsigned CW  = $clog2(NB),
  localparam int unsigned LW  = $clog2(MB),
  localparam int unsigned OW  = (P > 1) ? $clog2(P) : 1,
  localparam int unsigned TAGW = CW + BAW
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            start,
  input  logic [BAW:0]    n_blocks,
  // PCM_MEM read port
  output logic [BAW-1:0]  pcm_raddr,
  input  logic            pcm_last,
  input  logic [CW-1:0]   pcm_col,
  input  logic [OW-1:0]   pcm_off,
  // read addresses of the iteration datapath
  output logic [CW-1:0]   llr_raddr,
  output logic [BAW-1:0]  mes_raddr,
  output logic [LW-1:0]   syn_raddr,
  // to the node processors (aligned with the memory read data)
  output logic            npu_valid,
  output logic            npu_first,
  output logic            npu_last,
  output logic            npu_first_iter,
  output logic [OW-1:0]   npu_off,
  output logic [TAGW-1:0] npu_tag,
  input  logic            npu_out_valid,
  // decision and output units
  output logic            dec_start,
  input  logic            dec_done,
  input  ldpc_pkg::dec_result_t dec_result,
  output logic [IW-1:0]   iters,
  output logic            gb_start,
  input  logic            gb_done,
  // status
  output logic            iter_phase,    // ITER or DRAIN
  output logic            dec_phase,
  output logic            out_phase,
  output logic            busy,
  output logic            done,
  output logic            success
);

  typedef enum logic [2:0] {
    S_IDLE, S_ITER, S_DRAIN, S_DECIDE, S_OUTPUT, S_DONE
  } state_t;

  state_t          state;
  logic [BAW:0]    cnt;
  logic [BAW-1:0]  cnt_d1;
  logic [LW-1:0]   layer;
  logic            v1, first1;
  logic [BAW+1:0]  inflight;

  wire issue = (state == S_ITER) && (cnt < n_blocks);

  assign pcm_raddr  = cnt[BAW-1:0];
  assign llr_raddr  = pcm_col;
  assign mes_raddr  = cnt_d1;
  assign syn_raddr  = layer;
  assign iter_phase = (state == S_ITER) || (state == S_DRAIN);
  assign dec_phase  = (state == S_DECIDE);
  assign out_phase  = (state == S_OUTPUT);
  assign busy       = (state != S_IDLE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state          <= S_IDLE;
      cnt            <= '0;
      cnt_d1         <= '0;
      layer          <= '0;
      v1             <= 1'b0;
      first1         <= 1'b1;
      inflight       <= '0;
      npu_valid      <= 1'b0;
      npu_first      <= 1'b0;
      npu_last       <= 1'b0;
      npu_first_iter <= 1'b0;
      npu_off        <= '0;
      npu_tag        <= '0;
      dec_start      <= 1'b0;
      gb_start       <= 1'b0;
      iters          <= '0;
      done           <= 1'b0;
      success        <= 1'b0;
    end else begin
      dec_start <= 1'b0;
      gb_start  <= 1'b0;
      done      <= 1'b0;

      // read pipeline: stage 1 (matrix word valid)
      v1     <= issue;
      cnt_d1 <= cnt[BAW-1:0];
      if (issue) cnt <= cnt + 1'b1;
      npu_valid <= v1;
      if (v1) begin
        npu_first <= first1;
        npu_last  <= pcm_last;
        npu_off   <= pcm_off;
        npu_tag   <= {pcm_col, cnt_d1};
        first1    <= pcm_last;
        if (pcm_last) layer <= layer + 1'b1;
      end
      inflight <= inflight + (BAW+2)'(issue) - (BAW+2)'(npu_out_valid);

      case (state)
        S_IDLE: if (start) begin
          state          <= S_ITER;
          cnt            <= '0;
          layer          <= '0;
          first1         <= 1'b1;
          iters          <= '0;
          success        <= 1'b0;
          npu_first_iter <= 1'b1;
        end
        S_ITER: if (cnt == n_blocks) state <= S_DRAIN;
        S_DRAIN: if (inflight == '0 && !v1 && !npu_valid) begin
          state     <= S_DECIDE;
          iters     <= iters + 1'b1;
          dec_start <= 1'b1;
        end
        S_DECIDE: if (dec_done) begin
          unique case (dec_result)
            ldpc_pkg::DEC_PASS: begin
              state    <= S_OUTPUT;
              gb_start <= 1'b1;
              success  <= 1'b1;
            end
            ldpc_pkg::DEC_RETRY: begin
              state          <= S_ITER;
              cnt            <= '0;
              layer          <= '0;
              first1         <= 1'b1;
              npu_first_iter <= 1'b0;
            end
            default: state <= S_DONE;
          endcase
        end
        S_OUTPUT: if (gb_done) state <= S_DONE;
        S_DONE: begin
          done  <= 1'b1;
          state <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

endmodule
