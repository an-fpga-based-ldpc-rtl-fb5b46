// tb_npu - checks one check-node lane against a real-arithmetic model.
//
// Rows of random degree (1..MAX_DEG) and random syndrome bit are streamed
// back to back with random messages. For every node the bench computes
// E_i = sign_i * Psi(sum_k Psi|M_k| - Psi|M_i|) with exact Psi and the sign
// rule of the decision convention (x = 1 for a non-negative value,
// E_i >= 0 exactly when s XOR parity of the other nodes' x is 1), and
// compares the lane output LAT = MAX_DEG + 12 cycles after the input.
// Magnitudes are compared with a tolerance scaled to the size of the result,
// or, for results near the pole of Psi, by their Psi values; the sign must
// match.
//
// The stimulus and the reference model are this bench's own; the behaviour
// they check is the one described at the top of the unit under test.

module tb_npu;
  import ldpc_pkg::*;

  localparam int unsigned MAX_DEG = 6;
  localparam int unsigned LAT     = MAX_DEG + 12;

  logic clk = 1'b0;
  always #5 clk = ~clk;
  logic rst_n;
  logic in_valid, in_first, in_last, in_syn;
  llr_t in_m;
  logic out_valid;
  llr_t out_e;

  npu #(.MAX_DEG(MAX_DEG)) dut (.*);

  int checks = 0, failures = 0;

  function automatic real psi(input real x);
    real a;
    a = (x < 0) ? -x : x;
    if (a < 1.0 / 8192.0) a = 1.0 / 8192.0;
    return -$ln($tanh(a / 2.0));
  endfunction

  real  exp_q [$];
  int   exp_t [$];
  int   cyc = 0;
  always @(negedge clk) cyc++;

  // output checker
  always @(posedge clk) if (rst_n) begin
    if (out_valid) begin
      real e, g, tol;
      int  t;
      checks++;
      if (exp_q.size() == 0) begin
        failures++;
        $display("unexpected output");
      end else begin
        e = exp_q.pop_front();
        t = exp_t.pop_front();
        g = real'(out_e) / 8192.0;
        tol = 0.03 + 0.05 * ((e < 0) ? -e : e);
        // near Psi's pole a one-LSB difference of the argument moves the
        // result a lot: there compare in the Psi domain instead (Psi is its
        // own inverse), where the argument error is a few LSB
        if (!(g - e > tol || e - g > tol)) ;
        else if ((g < 0) == (e < 0) && psi(g) - psi(e) < 0.004 && psi(e) - psi(g) < 0.004) tol = 0;
        else tol = -1;
        if (cyc - t != LAT + 1 || tol < 0) begin
          failures++;
          if (failures < 10) $display("E got %f expected %f (latency %0d)", g, e, cyc - t);
        end
      end
    end
  end

  initial begin
    rst_n = 0;
    in_valid = 0; in_first = 0; in_last = 0; in_syn = 0; in_m = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(posedge clk);
    for (int row = 0; row < 400; row++) begin
      int  d;
      bit  s;
      real m [MAX_DEG];
      llr_t mq [MAX_DEG];
      real sum;
      bit  par;
      d = 1 + ($urandom % MAX_DEG);
      if (row % 7 == 0) d = MAX_DEG;
      s = $urandom % 2;
      sum = 0; par = s;
      for (int k = 0; k < d; k++) begin
        int raw;
        raw = int'($urandom % 60000) - 30000;           // about +/-3.7
        if (row % 11 == 0) raw = raw * 8;               // large values
        mq[k] = llr_t'(raw);
        m[k]  = real'(raw) / 8192.0;
        sum  += psi(m[k]);
        par  ^= (raw >= 0);
      end
      for (int k = 0; k < d; k++) begin
        real mag;
        bit  xk, pos;
        xk  = (m[k] >= 0);
        pos = par ^ xk;                 // s XOR parity of the others
        mag = psi(sum - psi(m[k]));
        if (mag > 31.9) mag = 31.9;
        exp_q.push_back(pos ? mag : -mag);
        exp_t.push_back(cyc);
        in_valid <= 1; in_first <= (k == 0); in_last <= (k == d - 1);
        in_syn <= s; in_m <= mq[k];
        @(posedge clk);
      end
    end
    in_valid <= 0;
    repeat (LAT + 5) @(posedge clk);
    checks++;
    if (exp_q.size() != 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
