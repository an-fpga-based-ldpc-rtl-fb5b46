// tb_mes_mem - simultaneous writes and reads at different addresses; checks
// read data (one cycle after the address) against a model array, including
// old data when reading an address that is written in the same cycle.
//
// The stimulus and the reference model are this bench's own; the behaviour
// they check is the one described at the top of the unit under test.

module tb_mes_mem;
  import ldpc_pkg::*;
  localparam int unsigned P = 4, WB = 30, AW = $clog2(WB);
  logic clk = 1'b0;
  always #5 clk = ~clk;
  logic we;
  logic [AW-1:0] waddr, raddr;
  llr_t wdata [P], rdata [P];
  mes_mem #(.P(P), .WB(WB)) dut (.*);
  int checks = 0, failures = 0;
  llr_t model [WB][P];
  llr_t expv [P];
  initial begin
    we = 0; waddr = '0; raddr = '0;
    for (int i = 0; i < P; i++) wdata[i] = '0;
    for (int a = 0; a < WB; a++) begin
      we <= 1; waddr <= AW'(a);
      for (int i = 0; i < P; i++) begin
        model[a][i] = llr_t'($urandom);
        wdata[i] <= model[a][i];
      end
      @(posedge clk);
    end
    for (int t = 0; t < 300; t++) begin
      int wa, ra;
      wa = $urandom % WB;
      ra = (t % 5 == 0) ? wa : $urandom % WB;
      we <= 1; waddr <= AW'(wa); raddr <= AW'(ra);
      for (int i = 0; i < P; i++) expv[i] = model[ra][i];
      for (int i = 0; i < P; i++) begin
        llr_t v;
        v = llr_t'($urandom);
        wdata[i] <= v;
        model[wa][i] = v;
      end
      @(posedge clk);
      @(negedge clk);
      for (int i = 0; i < P; i++) begin
        checks++;
        if (rdata[i] != expv[i]) failures++;
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
