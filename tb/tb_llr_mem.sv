// tb_llr_mem - random writes with random per-bank enables, then reads of all
// addresses; checks each bank against a model, including that a disabled
// bank keeps its old value, and that read data follows the address by one
// cycle.
//
// The stimulus and the reference model are this bench's own; the behaviour
// they check is the one described at the top of the unit under test.

module tb_llr_mem;
  import ldpc_pkg::*;
  localparam int unsigned P = 6, NB = 20, AW = $clog2(NB);
  logic clk = 1'b0;
  always #5 clk = ~clk;
  logic [P-1:0] we;
  logic [AW-1:0] waddr, raddr;
  llr_t wdata [P], rdata [P];
  llr_mem #(.P(P), .NB(NB)) dut (.*);
  int checks = 0, failures = 0;
  llr_t model [NB][P];
  initial begin
    we = '0; waddr = '0; raddr = '0;
    for (int i = 0; i < P; i++) wdata[i] = '0;
    for (int a = 0; a < NB; a++) begin
      we <= '1; waddr <= AW'(a);
      for (int i = 0; i < P; i++) begin
        model[a][i] = llr_t'($urandom);
        wdata[i] <= model[a][i];
      end
      @(posedge clk);
    end
    for (int t = 0; t < 200; t++) begin
      int a;
      logic [P-1:0] m;
      a = $urandom % NB;
      m = P'($urandom);
      we <= m; waddr <= AW'(a);
      for (int i = 0; i < P; i++) begin
        llr_t v;
        v = llr_t'($urandom);
        wdata[i] <= v;
        if (m[i]) model[a][i] = v;
      end
      @(posedge clk);
    end
    we <= '0;
    for (int a = 0; a < NB; a++) begin
      raddr <= AW'(a);
      @(posedge clk);
      @(negedge clk);
      for (int i = 0; i < P; i++) begin
        checks++;
        if (rdata[i] != model[a][i]) failures++;
      end
    end
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
