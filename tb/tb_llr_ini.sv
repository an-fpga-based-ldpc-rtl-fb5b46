// tb_llr_ini - checks LLR = ln(p0/p1) and where each LLR is written.
//
// Random probability pairs (including 0, 1 and extreme ratios) are streamed
// one per cycle; each write must appear exactly 4 cycles after its input,
// carry ln(p0/p1) within 0.002 (computed in real arithmetic), and go to bank
// v mod P at address v / P for the v-th variable since the last clear.
//
// The stimulus and the reference model are this bench's own; the behaviour
// they check is the one described at the top of the unit under test.

module tb_llr_ini;
  import ldpc_pkg::*;
  localparam int unsigned P = 5, NB = 40, AW = $clog2(NB);
  logic clk = 1'b0;
  always #5 clk = ~clk;
  logic rst_n, clear, p_valid;
  logic [15:0] p0, p1;
  logic [P-1:0] we;
  logic [AW-1:0] waddr;
  llr_t wdata;
  llr_ini #(.P(P), .NB(NB)) dut (.*);
  int checks = 0, failures = 0;

  real exp_v [$];
  int  exp_n [$];
  int  exp_t [$];
  int  cyc = 0;
  always @(negedge clk) cyc++;

  always @(negedge clk) if (rst_n && we != '0) begin
    real e, g;
    int  n, t;
    checks++;
    e = exp_v.pop_front(); n = exp_n.pop_front(); t = exp_t.pop_front();
    g = real'(wdata) / 8192.0;
    if (g - e > 0.002 || e - g > 0.002 || we != P'(1) << (n % P) ||
        waddr != AW'(n / P) || cyc - t != 5) begin
      failures++;
      if (failures < 10) $display("n=%0d got %f exp %f we=%b addr=%0d lat=%0d", n, g, e, we, waddr, cyc - t);
    end
  end

  initial begin
    int n;
    rst_n = 0; clear = 0; p_valid = 0; p0 = '0; p1 = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    n = 0;
    for (int t = 0; t < 150; t++) begin
      int a, b;
      real ea, eb, e;
      if (t == 80) begin
        clear <= 1; p_valid <= 0; @(posedge clk); clear <= 0;
        n = 0;
      end
      case (t % 6)
        0: begin a = $urandom % 65536; b = 65535 - a; end
        1: begin a = 0; b = $urandom % 65536; end
        2: begin a = $urandom % 300; b = 65000 + $urandom % 500; end
        default: begin a = $urandom % 65536; b = $urandom % 65536; end
      endcase
      ea = (a == 0) ? 1.0 : real'(a);
      eb = (b == 0) ? 1.0 : real'(b);
      e  = $ln(ea / eb);
      if (e > 31.99) e = 31.99;
      if (e < -31.99) e = -31.99;
      exp_v.push_back(e); exp_n.push_back(n); exp_t.push_back(cyc);
      p_valid <= 1; p0 <= 16'(a); p1 <= 16'(b);
      n++;
      @(posedge clk);
      if (t % 9 == 0) begin
        p_valid <= 0;
        @(posedge clk);
      end
    end
    p_valid <= 0;
    repeat (8) @(posedge clk);
    checks++;
    if (exp_v.size() != 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
