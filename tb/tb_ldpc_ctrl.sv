// tb_ldpc_ctrl - checks the iteration sequencer against scripted neighbours.
//
// The controller runs against a behavioural matrix memory (registered read),
// a stand-in node-processor array that returns every issued block a fixed
// number of cycles later, a stand-in decision unit that answers each
// dec_start after a few cycles with a scripted result, and a stand-in output
// unit. Checked:
//   - every iteration issues all blocks in matrix order with no gaps, with
//     the right column, block index, shift, layer-first and layer-last flags;
//   - the LLR, message and syndrome read addresses presented one cycle
//     before each issue select that block's column, message slot and layer;
//   - first_iter is set in the first iteration only;
//   - dec_start comes only after every issued block has been written back;
//   - RETRY starts another iteration, PASS starts the output unit and ends
//     with success, GIVE_UP ends without success and without output;
//   - iters counts the iterations, done pulses once per frame.
//
// The stimulus and the reference model are this bench's own; the behaviour
// they check is the one described at the top of the unit under test.

module tb_ldpc_ctrl;
  import ldpc_pkg::*;
  localparam int unsigned P = 8, WB = 20, NB = 6, MB = 7, IW = 4;
  localparam int unsigned BAW = $clog2(WB), CW = $clog2(NB), LW = $clog2(MB);
  localparam int unsigned OW = $clog2(P), TAGW = CW + BAW;
  localparam int unsigned NLAT = 9;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  logic rst_n, start;
  logic [BAW:0]    n_blocks;
  logic [BAW-1:0]  pcm_raddr;
  logic            pcm_last;
  logic [CW-1:0]   pcm_col;
  logic [OW-1:0]   pcm_off;
  logic [CW-1:0]   llr_raddr;
  logic [BAW-1:0]  mes_raddr;
  logic [LW-1:0]   syn_raddr;
  logic            npu_valid, npu_first, npu_last, npu_first_iter;
  logic [OW-1:0]   npu_off;
  logic [TAGW-1:0] npu_tag;
  logic            npu_out_valid;
  logic            dec_start, dec_done;
  dec_result_t     dec_result;
  logic [IW-1:0]   iters;
  logic            gb_start, gb_done;
  logic            iter_phase, dec_phase, out_phase, busy, done, success;
  ldpc_ctrl #(.P(P), .WB(WB), .NB(NB), .MB(MB), .IW(IW)) dut (.*);

  // matrix memory
  logic          m_last [WB];
  logic [CW-1:0] m_col  [WB];
  logic [OW-1:0] m_off  [WB];
  int            m_layer [WB];
  int            nblk;
  always @(posedge clk) begin
    pcm_last <= m_last[pcm_raddr];
    pcm_col  <= m_col[pcm_raddr];
    pcm_off  <= m_off[pcm_raddr];
  end
  // read addresses as a registered memory would see them
  logic [CW-1:0]  r_llr;
  logic [BAW-1:0] r_mes;
  logic [LW-1:0]  r_syn;
  always @(posedge clk) begin
    r_llr <= llr_raddr; r_mes <= mes_raddr; r_syn <= syn_raddr;
  end
  // node-processor stand-in: fixed latency
  logic [NLAT-1:0] pipe;
  always @(posedge clk or negedge rst_n)
    if (!rst_n) pipe <= '0; else pipe <= {pipe[NLAT-2:0], npu_valid};
  assign npu_out_valid = pipe[NLAT-1];
  // decision stand-in
  dec_result_t script [$];
  int dec_wait;
  always @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      dec_done <= 1'b0; dec_result <= DEC_NONE; dec_wait <= 0;
    end else begin
      dec_done <= 1'b0;
      if (dec_start) dec_wait <= 5;
      else if (dec_wait > 0) begin
        dec_wait <= dec_wait - 1;
        if (dec_wait == 1) begin
          dec_done   <= 1'b1;
          dec_result <= (script.size() > 0) ? script.pop_front() : DEC_GIVE_UP;
        end
      end
    end
  end
  // output-unit stand-in
  int gb_wait;
  always @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      gb_done <= 1'b0; gb_wait <= 0;
    end else begin
      gb_done <= 1'b0;
      if (gb_start) gb_wait <= 7;
      else if (gb_wait > 0) begin
        gb_wait <= gb_wait - 1;
        if (gb_wait == 1) gb_done <= 1'b1;
      end
    end
  end

  int checks = 0, failures = 0;
  int issued = 0, returned = 0, iter_no = 0, n_done = 0, n_gb = 0, n_dec = 0;
  int blk = 0;
  logic prev_valid = 1'b0;
  int   gaps = 0;

  task automatic fail(input string s);
    failures++;
    if (failures < 12) $display("%s", s);
  endtask

  always @(negedge clk) if (rst_n) begin
    if (npu_valid) begin
      int exp_first;
      checks++;
      exp_first = (blk == 0) || m_last[blk - 1];
      if (npu_tag != {m_col[blk], BAW'(blk)} || npu_off != m_off[blk] ||
          npu_last != m_last[blk] || npu_first != exp_first[0] ||
          npu_first_iter != (iter_no == 0))
        fail($sformatf("iter %0d block %0d: tag %h off %0d first %b last %b fi %b",
                       iter_no, blk, npu_tag, npu_off, npu_first, npu_last, npu_first_iter));
      checks++;
      if (r_llr != m_col[blk] || r_mes != BAW'(blk) || int'(r_syn) != m_layer[blk])
        fail($sformatf("block %0d: read addresses llr %0d mes %0d syn %0d", blk, r_llr, r_mes, r_syn));
      if (blk > 0 && !prev_valid) gaps++;
      blk++;
      issued++;
    end
    prev_valid = npu_valid;
    if (npu_out_valid) returned++;
    if (dec_start) begin
      checks++;
      n_dec++;
      if (returned != issued || blk != nblk || !dec_phase || int'(iters) != iter_no + 1)
        fail($sformatf("dec_start: returned %0d issued %0d blocks %0d iters %0d",
                       returned, issued, blk, iters));
      blk = 0;
      iter_no++;
    end
    if (gb_start) n_gb++;
    if (gb_done || (dec_done && dec_result == DEC_PASS)) begin
      checks++;
      if (!(out_phase || dec_phase)) fail("output phase flag");
    end
    if (done) n_done++;
  end

  task automatic make_code();
    int l = 0;
    nblk = 0;
    while (nblk < WB - 3 && l < MB) begin
      int d = 2 + $urandom % 2;
      for (int k = 0; k < d; k++) begin
        m_col[nblk]   = CW'($urandom % NB);
        m_off[nblk]   = OW'($urandom);
        m_last[nblk]  = (k == d - 1);
        m_layer[nblk] = l;
        nblk++;
      end
      l++;
    end
  endtask

  task automatic frame(input dec_result_t res [$], input int exp_iters, input logic exp_ok);
    int t = 0;
    make_code();
    script = res;
    issued = 0; returned = 0; iter_no = 0; n_done = 0; n_gb = 0; n_dec = 0; blk = 0; gaps = 0;
    @(negedge clk);
    n_blocks = (BAW+1)'(nblk); start = 1;
    @(negedge clk) start = 0;
    while (!done && t < 2000) begin @(negedge clk); t++; end
    repeat (3) @(negedge clk);
    checks++;
    if (n_done != 1 || success != exp_ok || int'(iters) != exp_iters || n_dec != exp_iters ||
        n_gb != int'(exp_ok) || gaps != 0 || busy || issued != exp_iters * nblk)
      fail($sformatf("frame: done %0d success %b iters %0d/%0d dec %0d gb %0d gaps %0d busy %b issued %0d",
                     n_done, success, iters, exp_iters, n_dec, n_gb, gaps, busy, issued));
  endtask

  initial begin
    rst_n = 0; start = 0; n_blocks = '0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;
    for (int f = 0; f < 6; f++) begin
      frame('{DEC_RETRY, DEC_RETRY, DEC_PASS}, 3, 1'b1);
      frame('{DEC_PASS}, 1, 1'b1);
      frame('{DEC_RETRY, DEC_GIVE_UP}, 2, 1'b0);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
