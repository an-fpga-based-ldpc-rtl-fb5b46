// tb_ldpc_decoder_full - complete decodings at the default (full) size.
//
// The decoder is instantiated with its default parameters (P = 64 lanes,
// memories for 5468 block columns, 4840 layers, 19,617 non-zero blocks) and
// decodes one frame on each of two codes with the sizes of the two target
// codes, one after the other in the same instance:
//   rate 0.430: 4096 block columns (262,144 bits), 2335 layers, 19,617
//               blocks (8 or 9 per layer), sigma = 0.6;
//   rate 0.115: 5468 block columns (349,952 bits), 4840 layers, 17,041
//               blocks (3 or 4 per layer), sigma = 0.6.
// Layer j uses block columns j + k*S mod NB with random offsets (S = 455 and
// 1367), so a column comes back only S layers later. These are test codes of
// the right size and shape, not optimised codes: the sparse rate-0.115 test
// code has a few low-weight codewords, so there the decoder may settle on a
// word that meets the syndrome but differs from the transmitted one in a few
// bits (up to 40 are accepted). For each frame the bench checks success,
// that all words are streamed, that the streamed word meets the syndrome
// (recomputed here), the bit errors against the transmitted word, one
// decision per iteration, and that each iteration is fed for n_blocks
// consecutive cycles.
//
// The stimulus and the reference model are this bench's own; the behaviour
// they check is the one described at the top of the unit under test.

module tb_ldpc_decoder_full;
  import ldpc_pkg::*;

  localparam int unsigned P   = 64;
  localparam int unsigned NMAX = 5468 * P;   // bits of the longest code
  localparam int unsigned MMAX = 4840;       // layers of the longest code
  localparam real         SIGMA_B = 0.6;
  localparam int unsigned WBM = 19617;
  localparam int unsigned BAW = $clog2(WBM);
  localparam int unsigned CW  = $clog2(5468);
  localparam int unsigned LW  = $clog2(4840);

  logic clk = 1'b0;
  always #5 clk = ~clk;
  logic rst_n;

  logic [BAW:0]   n_blocks;
  logic [CW:0]    n_cols;
  logic [7:0]     max_iter;
  logic           pcm_we, pcm_wlast;
  logic [BAW-1:0] pcm_waddr;
  logic [CW-1:0]  pcm_wcol;
  logic [5:0]     pcm_woff;
  logic           syn_we;
  logic [LW-1:0]  syn_waddr;
  logic [P-1:0]   syn_wdata;
  logic           p_clear, p_valid;
  logic [15:0]    p0, p1;
  logic           start, busy, done, success;
  logic [7:0]     iters;
  logic [LW:0]    dec_layers_ok;
  logic           out_valid;
  logic [CW-1:0]  out_idx;
  logic [P-1:0]   out_bits;

  ldpc_decoder dut (.*);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  int unsigned hcol [WBM];
  int unsigned hoff [WBM];
  bit          hlast [WBM];
  int unsigned lstart [MMAX + 1];
  bit          x_true [NMAX];
  bit          x_out [NMAX];
  int          nblk, words_out, bit_err;

  function automatic real gauss();
    real u1, u2;
    u1 = (real'($urandom % 1000000) + 1.0) / 1000001.0;
    u2 = real'($urandom % 1000000) / 1000000.0;
    return $sqrt(-2.0 * $ln(u1)) * $cos(6.283185307 * u2);
  endfunction

  int run_valid, falls, iter_feeds, bad_runs;
  bit prev_v;
  always @(posedge clk) if (rst_n) begin
    if (dut.npu_valid) run_valid++;
    if (prev_v && !dut.npu_valid) falls++;
    prev_v <= dut.npu_valid;
    if (dut.dec_start) begin
      iter_feeds++;
      if (run_valid != nblk || falls != 1) bad_runs++;
      run_valid = 0;
      falls = 0;
    end
    if (out_valid) begin
      for (int i = 0; i < P; i++) x_out[int'(out_idx) * P + i] = out_bits[i];
      words_out++;
    end
  end

  // one complete frame on a code with nbu block columns, mbu layers and
  // nbt non-zero blocks (layers of d or d + 1 blocks, spread evenly)
  task automatic run_code(input int nbu, input int mbu, input int nbt, input int s,
                          input real sigma, input int max_err, input string name);
    int d, n_hi, n, syn_bad;
    d    = nbt / mbu;
    n_hi = nbt - d * mbu;
    n    = nbu * P;
    run_valid = 0; falls = 0; iter_feeds = 0; bad_runs = 0; words_out = 0;
    // code
    nblk = 0;
    for (int j = 0; j < mbu; j++) begin
      int dj;
      dj = d + (((j + 1) * n_hi) / mbu - (j * n_hi) / mbu);
      lstart[j] = nblk;
      for (int k = 0; k < dj; k++) begin
        hcol[nblk]  = (j + k * s) % nbu;
        hoff[nblk]  = $urandom % P;
        hlast[nblk] = (k == dj - 1);
        nblk++;
      end
    end
    lstart[mbu] = nblk;
    n_blocks = (BAW+1)'(nblk); n_cols = (CW+1)'(nbu); max_iter = 8'd30;
    for (int b = 0; b < nblk; b++) begin
      pcm_we <= 1; pcm_waddr <= BAW'(b); pcm_wcol <= CW'(hcol[b]);
      pcm_woff <= 6'(hoff[b]); pcm_wlast <= hlast[b];
      @(posedge clk);
    end
    pcm_we <= 0;
    // word and syndrome
    for (int v = 0; v < n; v++) x_true[v] = $urandom % 2;
    for (int j = 0; j < mbu; j++) begin
      logic [P-1:0] sw;
      sw = '0;
      for (int b = lstart[j]; b < lstart[j + 1]; b++)
        for (int r = 0; r < P; r++) sw[r] ^= x_true[hcol[b] * P + (r + hoff[b]) % P];
      syn_we <= 1; syn_waddr <= LW'(j); syn_wdata <= sw;
      @(posedge clk);
    end
    syn_we <= 0;
    // channel
    p_clear <= 1; @(posedge clk); p_clear <= 0;
    for (int v = 0; v < n; v++) begin
      real y, pr;
      int  q0, q1;
      y  = (x_true[v] ? 1.0 : -1.0) + sigma * gauss();
      pr = 1.0 / (1.0 + $exp(-2.0 * y / (sigma * sigma)));
      q0 = int'(pr * 65536.0);
      q1 = int'((1.0 - pr) * 65536.0);
      if (q0 < 1) q0 = 1; if (q0 > 65535) q0 = 65535;
      if (q1 < 1) q1 = 1; if (q1 > 65535) q1 = 65535;
      p_valid <= 1; p0 <= 16'(q0); p1 <= 16'(q1);
      @(posedge clk);
    end
    p_valid <= 0;
    repeat (6) @(posedge clk);
    // decode
    start <= 1; @(posedge clk); start <= 0;
    while (!done) @(posedge clk);
    @(posedge clk);
    bit_err = 0;
    for (int v = 0; v < n; v++) if (x_out[v] != x_true[v]) bit_err++;
    $display("layers ok in the last decision pass: %0d", dec_layers_ok);
    $display("%s: %0d bits, %0d layers, %0d blocks, %0d iterations, %0d output words, %0d bit errors",
             name, n, mbu, nblk, iters, words_out, bit_err);
    check(success, {name, ": decoding succeeds"});
    check(words_out == nbu, {name, ": all words streamed"});
    // syndrome of the streamed word, recomputed here
    syn_bad = 0;
    for (int j = 0; j < mbu; j++) begin
      logic [P-1:0] sw, so;
      sw = '0; so = '0;
      for (int b = lstart[j]; b < lstart[j + 1]; b++)
        for (int r = 0; r < P; r++) begin
          sw[r] ^= x_true[hcol[b] * P + (r + hoff[b]) % P];
          so[r] ^= x_out[hcol[b] * P + (r + hoff[b]) % P];
        end
      if (sw != so) syn_bad++;
    end
    check(syn_bad == 0, {name, ": streamed word meets the syndrome"});
    check(bit_err <= max_err, {name, ": output equals the transmitted word"});
    check(iter_feeds == int'(iters) && iter_feeds > 0, {name, ": one decision per iteration"});
    check(bad_runs == 0, {name, ": each iteration fed without idle cycles"});
  endtask

  initial begin
    rst_n = 0;
    {pcm_we, syn_we, p_clear, p_valid, start} = '0;
    pcm_waddr = '0; pcm_wcol = '0; pcm_woff = '0; pcm_wlast = 0;
    syn_waddr = '0; syn_wdata = '0; p0 = '0; p1 = '0;
    prev_v = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    run_code(4096, 2335, 19617, 455, 0.6, 0, "rate 0.430 code");
    run_code(5468, 4840, 17041, 1367, SIGMA_B, 40, "rate 0.115 code");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (6000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
