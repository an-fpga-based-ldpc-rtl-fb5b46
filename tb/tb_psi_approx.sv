// tb_psi_approx - checks the Psi unit against the exact function.
//
// Random and edge-case magnitudes are applied one per cycle; each result is
// compared, exactly 5 cycles later, with -ln(tanh(x/2)) computed in real
// arithmetic (tolerance 0.01, saturated at the largest magnitude). A wrong
// latency makes the results land against the wrong inputs and fail.
//
// The stimulus and the reference model are this bench's own; the behaviour
// they check is the one described at the top of the unit under test.

module tb_psi_approx;
  import ldpc_pkg::*;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  mag_t din, dout;
  psi_approx dut (.clk(clk), .din(din), .dout(dout));

  int checks = 0, failures = 0;
  mag_t hist [$];

  function automatic real psi_ref(input mag_t m);
    real x, y;
    x = (m == 0) ? 1.0 / 8192.0 : real'(m) / 8192.0;   // 0 is taken as one LSB
    y = -$ln($tanh(x / 2.0));
    if (y > real'(MAG_MAX) / 8192.0) y = real'(MAG_MAX) / 8192.0;
    return y;
  endfunction

  initial begin
    int n;
    n = 0;
    din = '0;
    repeat (2) @(posedge clk);
    for (int i = 0; i < 6000; i++) begin
      mag_t m;
      if (i < 64)        m = mag_t'(i);
      else if (i < 100)  m = mag_t'(1 << (i % 18));
      else if (i < 120)  m = MAG_MAX - mag_t'(i);
      else               m = mag_t'($urandom) >> ($urandom % 18);
      din <= m;
      hist.push_back(m);
      @(posedge clk);
      if (hist.size() >= 5) begin
        mag_t mi;
        real got, exp;
        mi  = hist.pop_front();
        #1;
        got = real'(dout) / 8192.0;
        exp = psi_ref(mi);
        checks++;
        if (got - exp > 0.01 || exp - got > 0.01) begin
          failures++;
          if (failures < 10) $display("psi(%0d): got %f expected %f", mi, got, exp);
        end
      end
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
