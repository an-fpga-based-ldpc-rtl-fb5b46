// tb_decision - checks the syndrome test against a software model.
//
// Random small quasi-cyclic matrices (layers of 2 or 3 blocks, random block
// columns and shifts) and random LLR signs are placed in behavioural
// memories with registered reads, like the real PCM, LLR and syndrome
// memories. The testbench computes each layer's syndrome from the hard bits
// (bit = 1 for a non-negative LLR, rotated by the block shift as the node
// processors see it) and then runs three cases per matrix:
//   - stored syndrome equals the computed one: result PASS, all layers good;
//   - one bit flipped in layer k: result RETRY, exactly k layers good, and
//     the unit stops early (done before the blocks after layer k are read);
//   - the same with iters_done == max_iter: result GIVE_UP.
// Each run must raise done exactly once.
//
// The stimulus and the reference model are this bench's own; the behaviour
// they check is the one described at the top of the unit under test.

module tb_decision;
  import ldpc_pkg::*;
  localparam int unsigned P = 8, WB = 24, NB = 6, MB = 8, IW = 4;
  localparam int unsigned BAW = $clog2(WB), CW = $clog2(NB), LW = $clog2(MB);
  localparam int unsigned OW = $clog2(P);
  logic clk = 1'b0;
  always #5 clk = ~clk;
  logic rst_n, start;
  logic [BAW:0]   n_blocks;
  logic [IW-1:0]  iters_done, max_iter;
  logic [BAW-1:0] pcm_raddr;
  logic           pcm_last;
  logic [CW-1:0]  pcm_col;
  logic [OW-1:0]  pcm_off;
  logic [CW-1:0]  llr_raddr;
  logic [P-1:0]   llr_sign;
  logic [LW-1:0]  syn_raddr;
  logic [P-1:0]   syn_rdata;
  logic           done;
  dec_result_t    result;
  logic [LW:0]    layers_ok;
  decision #(.P(P), .WB(WB), .NB(NB), .MB(MB), .IW(IW)) dut (.*);

  // behavioural memories, registered read
  logic          m_last [WB];
  logic [CW-1:0] m_col  [WB];
  logic [OW-1:0] m_off  [WB];
  logic [P-1:0]  m_sgn  [NB];
  logic [P-1:0]  m_syn  [MB];
  always @(posedge clk) begin
    pcm_last  <= m_last[pcm_raddr];
    pcm_col   <= m_col[pcm_raddr];
    pcm_off   <= m_off[pcm_raddr];
    llr_sign  <= m_sgn[llr_raddr];
    syn_rdata <= m_syn[syn_raddr];
  end

  int checks = 0, failures = 0;
  int n_done = 0;
  always @(negedge clk) if (rst_n && done) n_done++;

  int nblk, layer_end [MB];
  logic [P-1:0] syn_ref [MB];

  task automatic make_code();
    nblk = 0;
    for (int l = 0; l < MB; l++) begin
      int d;
      logic [NB-1:0] used;
      d = 2 + $urandom % 2;
      used = '0;
      for (int k = 0; k < d; k++) begin
        int c;
        do c = $urandom % NB; while (used[c]);
        used[c] = 1'b1;
        m_col[nblk]  = CW'(c);
        m_off[nblk]  = OW'($urandom);
        m_last[nblk] = (k == d - 1);
        nblk++;
      end
      layer_end[l] = nblk;
    end
    for (int c = 0; c < NB; c++) m_sgn[c] = P'($urandom);
    // reference syndrome
    begin
      int l = 0;
      logic [P-1:0] acc = '0;
      for (int b = 0; b < nblk; b++) begin
        for (int r = 0; r < P; r++)
          acc[r] ^= ~m_sgn[m_col[b]][(r + int'(m_off[b])) % P];
        if (m_last[b]) begin
          syn_ref[l] = acc;
          acc = '0;
          l++;
        end
      end
    end
  endtask

  task automatic run(input dec_result_t exp_res, input int exp_ok, input int max_cycles,
                     input logic [IW-1:0] it, input logic [IW-1:0] mx);
    int t;
    @(negedge clk);
    n_blocks = (BAW+1)'(nblk); iters_done = it; max_iter = mx;
    n_done = 0; start = 1;
    @(negedge clk) start = 0;
    t = 0;
    while (!done && t < 200) begin @(negedge clk); t++; end
    repeat (4) @(negedge clk);
    checks++;
    if (result != exp_res || int'(layers_ok) != exp_ok || n_done != 1 || t > max_cycles) begin
      failures++;
      $display("result %s exp %s, layers_ok %0d exp %0d, done %0d, cycles %0d max %0d",
               result.name(), exp_res.name(), layers_ok, exp_ok, n_done, t, max_cycles);
    end
  endtask

  initial begin
    rst_n = 0; start = 0; n_blocks = '0; iters_done = '0; max_iter = '0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;
    for (int trial = 0; trial < 40; trial++) begin
      int k, j;
      make_code();
      for (int l = 0; l < MB; l++) m_syn[l] = syn_ref[l];
      run(DEC_PASS, MB, nblk + 4, 4'd1, 4'd10);
      k = $urandom % MB;
      j = $urandom % P;
      m_syn[k][j] = ~m_syn[k][j];
      run(DEC_RETRY, k, layer_end[k] + 4, 4'd3, 4'd10);
      run(DEC_GIVE_UP, k, layer_end[k] + 4, 4'd10, 4'd10);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
