// tb_gen_bit - checks the hard-decision output stream.
//
// A behavioural LLR sign memory (one P-bit sign word per block column,
// registered read like the real banks) is filled with random signs. After a
// start pulse the unit must emit every column exactly once, in order
// 0..n_cols-1, with out_bits = ~sign (bit 1 for a non-negative LLR), the
// first word 3 cycles after start, one word per cycle, and a single done
// pulse together with the last word. Several frame lengths, including one
// column and the full depth, are run back to back.
//
// The stimulus and the reference model are this bench's own; the behaviour
// they check is the one described at the top of the unit under test.

module tb_gen_bit;
  localparam int unsigned P = 8, NB = 13, CW = $clog2(NB);
  logic clk = 1'b0;
  always #5 clk = ~clk;
  logic rst_n, start;
  logic [CW:0]   n_cols;
  logic [CW-1:0] llr_raddr;
  logic [P-1:0]  llr_sign;
  logic          out_valid, done;
  logic [CW-1:0] out_idx;
  logic [P-1:0]  out_bits;
  gen_bit #(.P(P), .NB(NB)) dut (.*);

  logic [P-1:0] sgn [NB];
  always @(posedge clk) llr_sign <= sgn[llr_raddr];

  int checks = 0, failures = 0;
  int cyc = 0, t_start = 0, expect_idx = 0, n_done = 0;
  always @(posedge clk) cyc++;

  // sampled after each rising edge, when the outputs have settled
  always @(negedge clk) if (rst_n) begin
    if (out_valid) begin
      checks++;
      if (out_idx != CW'(expect_idx) || out_bits != ~sgn[expect_idx] ||
          cyc - t_start != 3 + expect_idx) begin
        failures++;
        $display("word %0d: idx %0d bits %b exp %b at %0d", expect_idx, out_idx,
                 out_bits, ~sgn[expect_idx], cyc - t_start);
      end
      expect_idx++;
    end
    if (done) begin
      n_done++;
      checks++;
      if (!out_valid || expect_idx != int'(n_cols)) begin
        failures++;
        $display("done with %0d of %0d words", expect_idx, n_cols);
      end
    end
  end

  initial begin
    rst_n = 0; start = 0; n_cols = '0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;
    for (int f = 0; f < 8; f++) begin
      int n;
      n = (f == 0) ? 1 : (f == 1) ? NB : 1 + $urandom % NB;
      for (int c = 0; c < NB; c++) sgn[c] = P'($urandom);
      @(negedge clk);
      n_cols = (CW+1)'(n); start = 1; expect_idx = 0; n_done = 0;
      t_start = cyc;
      @(negedge clk) start = 0;
      repeat (n + 6) @(negedge clk);
      checks++;
      if (expect_idx != n || n_done != 1) begin
        failures++;
        $display("frame %0d: %0d of %0d words, %0d done pulses", f, expect_idx, n, n_done);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
