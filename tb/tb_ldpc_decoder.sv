// tb_ldpc_decoder - end-to-end test of the decoder at a reduced size.
//
// The bench builds a quasi-cyclic matrix that obeys the decoder's spacing
// rule (layer j uses block columns j, j+S, j+2S, j+3S mod NB with random
// offsets, so a column comes back only S layers later), draws a random word
// X, computes its syndrome S = H X^T, sends X over a BPSK/AWGN channel and
// feeds the decoder the per-bit likelihoods. Independently of the decoder it
// checks that:
//   - a frame at moderate noise decodes to exactly X and the bits streamed
//     out satisfy H x^T = S;
//   - a frame at heavy noise with a small iteration limit gives up after
//     exactly max_iter iterations and streams nothing;
//   - every iteration feeds the node processors n_blocks blocks on n_blocks
//     consecutive cycles (no idle cycle between layers) and the first
//     decision starts a fixed n_blocks + MAX_DEG + 21 cycles after start;
//   - a failing decision stops at the first failing layer.
// It counts how often each mechanism happened (retry after a failed
// decision, early stop of the decision, give-up, pass, output) and counts a
// failure for any that never happened.
//
// The stimulus and the reference model are this bench's own; the behaviour
// they check is the one described at the top of the unit under test.

module tb_ldpc_decoder;
  import ldpc_pkg::*;

  localparam int unsigned P       = 16;
  localparam int unsigned NB      = 48;
  localparam int unsigned MB      = 36;
  localparam int unsigned DEG     = 4;
  localparam int unsigned WB      = MB * DEG;
  localparam int unsigned MAX_DEG = 4;
  localparam int unsigned S       = NB / DEG;
  localparam int unsigned IW      = 8;
  localparam int unsigned N       = NB * P;
  localparam int unsigned BAW     = $clog2(WB);
  localparam int unsigned CW      = $clog2(NB);
  localparam int unsigned LW      = $clog2(MB);
  localparam int unsigned OW      = $clog2(P);

  logic clk = 1'b0;
  always #5 clk = ~clk;
  logic rst_n;

  logic [BAW:0]   n_blocks;
  logic [CW:0]    n_cols;
  logic [IW-1:0]  max_iter;
  logic           pcm_we, pcm_wlast;
  logic [BAW-1:0] pcm_waddr;
  logic [CW-1:0]  pcm_wcol;
  logic [OW-1:0]  pcm_woff;
  logic           syn_we;
  logic [LW-1:0]  syn_waddr;
  logic [P-1:0]   syn_wdata;
  logic           p_clear, p_valid;
  logic [15:0]    p0, p1;
  logic           start, busy, done, success;
  logic [IW-1:0]  iters;
  logic [LW:0]    dec_layers_ok;
  logic           out_valid;
  logic [CW-1:0]  out_idx;
  logic [P-1:0]   out_bits;

  ldpc_decoder #(.P(P), .NB(NB), .MB(MB), .WB(WB), .MAX_DEG(MAX_DEG), .IW(IW)) dut (.*);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // ---------------- code and data ----------------
  int unsigned hcol [WB];
  int unsigned hoff [WB];
  bit          hlast [WB];
  bit          x_true [N];
  bit          syn [MB][P];
  bit          x_out [N];
  int          words_out;

  function automatic real gauss();
    real u1, u2;
    u1 = (real'($urandom % 1000000) + 1.0) / 1000001.0;
    u2 = real'($urandom % 1000000) / 1000000.0;
    return $sqrt(-2.0 * $ln(u1)) * $cos(6.283185307 * u2);
  endfunction

  task automatic build_code();
    int n;
    n = 0;
    for (int j = 0; j < MB; j++)
      for (int k = 0; k < DEG; k++) begin
        hcol[n]  = (j + k * S) % NB;
        hoff[n]  = $urandom % P;
        hlast[n] = (k == DEG - 1);
        n++;
      end
  endtask

  task automatic make_frame();
    for (int v = 0; v < N; v++) x_true[v] = $urandom % 2;
    for (int j = 0; j < MB; j++)
      for (int r = 0; r < P; r++) begin
        bit s;
        s = 0;
        for (int k = 0; k < DEG; k++) begin
          int b;
          b = j * DEG + k;
          s ^= x_true[hcol[b] * P + (r + hoff[b]) % P];
        end
        syn[j][r] = s;
      end
  endtask

  task automatic load_matrix();
    for (int b = 0; b < WB; b++) begin
      pcm_we <= 1; pcm_waddr <= BAW'(b); pcm_wcol <= CW'(hcol[b]);
      pcm_woff <= OW'(hoff[b]); pcm_wlast <= hlast[b];
      @(posedge clk);
    end
    pcm_we <= 0;
  endtask

  task automatic load_frame(input real sigma);
    for (int j = 0; j < MB; j++) begin
      syn_we <= 1; syn_waddr <= LW'(j);
      for (int r = 0; r < P; r++) syn_wdata[r] <= syn[j][r];
      @(posedge clk);
    end
    syn_we <= 0;
    p_clear <= 1; @(posedge clk); p_clear <= 0;
    for (int v = 0; v < N; v++) begin
      real y, pr;
      int  q0, q1;
      y  = (x_true[v] ? 1.0 : -1.0) + sigma * gauss();
      pr = 1.0 / (1.0 + $exp(-2.0 * y / (sigma * sigma)));   // P(bit = 1)
      q0 = int'(pr * 65536.0);
      q1 = int'((1.0 - pr) * 65536.0);
      if (q0 < 1) q0 = 1; if (q0 > 65535) q0 = 65535;
      if (q1 < 1) q1 = 1; if (q1 > 65535) q1 = 65535;
      p_valid <= 1; p0 <= 16'(q0); p1 <= 16'(q1);
      @(posedge clk);
    end
    p_valid <= 0;
    repeat (6) @(posedge clk);
  endtask

  // ---------------- monitors ----------------
  int cyc = 0;
  always @(posedge clk) cyc++;
  int run_valid, iter_feeds, gaps, falls;
  int n_retry = 0, n_early = 0, n_giveup = 0, n_pass = 0, n_words = 0;
  int t_start, t_first_dec;
  bit seen_dec;
  bit prev_v;
  always @(posedge clk) if (rst_n) begin
    // node-processor feed: count blocks and idle gaps inside an iteration
    if (dut.npu_valid) run_valid++;
    if (prev_v && !dut.npu_valid) falls++;
    prev_v <= dut.npu_valid;
    if (dut.dec_start) begin
      iter_feeds++;
      checks++;
      if (run_valid != int'(n_blocks)) begin
        failures++;
        $display("FAIL: iteration fed %0d blocks, expected %0d", run_valid, n_blocks);
      end
      if (falls != 1) gaps++;   // the blocks of one iteration form one unbroken run
      run_valid = 0;
      falls = 0;
      if (!seen_dec) begin
        seen_dec = 1;
        t_first_dec = cyc;
      end
    end
    if (dut.dec_done) begin
      case (dut.dec_result)
        DEC_PASS:    n_pass++;
        DEC_RETRY:   n_retry++;
        DEC_GIVE_UP: n_giveup++;
        default: ;
      endcase
      if (dut.dec_result != DEC_PASS && int'(dec_layers_ok) < MB) n_early++;
    end
    if (out_valid) begin
      for (int i = 0; i < P; i++) x_out[int'(out_idx) * P + i] = out_bits[i];
      words_out++;
      n_words++;
    end
  end

  task automatic run(input int mi);
    max_iter <= IW'(mi);
    words_out = 0;
    run_valid = 0;
    seen_dec  = 0;
    gaps      = 0;
    falls     = 0;
    start <= 1; @(posedge clk); start <= 0;
    t_start = cyc;
    while (!done) @(posedge clk);
    @(posedge clk);
  endtask

  function automatic bit syndrome_ok();
    for (int j = 0; j < MB; j++)
      for (int r = 0; r < P; r++) begin
        bit s;
        s = 0;
        for (int k = 0; k < DEG; k++) begin
          int b;
          b = j * DEG + k;
          s ^= x_out[hcol[b] * P + (r + hoff[b]) % P];
        end
        if (s != syn[j][r]) return 0;
      end
    return 1;
  endfunction

  real sg;
  initial begin
    rst_n = 0;
    {pcm_we, syn_we, p_clear, p_valid, start} = '0;
    pcm_waddr = '0; pcm_wcol = '0; pcm_woff = '0; pcm_wlast = 0;
    syn_waddr = '0; syn_wdata = '0; p0 = '0; p1 = '0;
    n_blocks = (BAW+1)'(WB); n_cols = (CW+1)'(NB); max_iter = 8'd20;
    repeat (3) @(posedge clk);
    rst_n = 1;
    build_code();
    load_matrix();

    // frames at moderate noise: must decode to the transmitted word
    sg = 0.50;
    for (int f = 0; f < 8; f++) begin
      make_frame();
      load_frame(sg);
      sg = sg + 0.03;
      run(20);
      check(success, "moderate-noise frame decodes");
      check(words_out == NB, "all output words streamed");
      check(syndrome_ok(), "output satisfies H x = S");
      begin
        int errs;
        errs = 0;
        for (int v = 0; v < N; v++) if (x_out[v] != x_true[v]) errs++;
        check(errs == 0, $sformatf("decoded word equals X (%0d bit errors)", errs));
      end
      check(gaps == 0, "no idle cycle between layers");
      check(t_first_dec - t_start == int'(n_blocks) + MAX_DEG + 21,
            $sformatf("first decision after %0d cycles", t_first_dec - t_start));
      $display("frame %0d: iterations %0d", f, iters);
    end

    // heavy noise, small limit: must give up
    make_frame();
    load_frame(1.6);
    run(2);
    check(!success, "heavy-noise frame gives up");
    check(iters == 2, "gave up after max_iter iterations");
    check(words_out == 0, "nothing streamed after give-up");

    $display("mechanisms: pass=%0d retry=%0d early_stop=%0d give_up=%0d words=%0d iterations_fed=%0d",
             n_pass, n_retry, n_early, n_giveup, n_words, iter_feeds);
    check(n_pass > 0,   "decision pass happened");
    check(n_retry > 0,  "retry after failed decision happened");
    check(n_early > 0,  "early stop of a decision happened");
    check(n_giveup > 0, "give-up at iteration limit happened");
    check(n_words > 0,  "bit generation happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
