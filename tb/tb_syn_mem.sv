// tb_syn_mem - writes through both ports, reads through both ports at once,
// and checks each port's data one cycle after its address.
//
// The stimulus and the reference model are this bench's own; the behaviour
// they check is the one described at the top of the unit under test.

module tb_syn_mem;
  localparam int unsigned P = 8, MB = 24, AW = $clog2(MB);
  logic clk = 1'b0;
  always #5 clk = ~clk;
  logic we_a, we_b;
  logic [AW-1:0] addr_a, addr_b;
  logic [P-1:0] wdata_a, wdata_b, rdata_a, rdata_b;
  syn_mem #(.P(P), .MB(MB)) dut (.*);
  int checks = 0, failures = 0;
  logic [P-1:0] model [MB];
  initial begin
    we_a = 0; we_b = 0; addr_a = '0; addr_b = '0; wdata_a = '0; wdata_b = '0;
    for (int a = 0; a < MB; a += 2) begin
      model[a] = P'($urandom); model[a+1] = P'($urandom);
      we_a <= 1; addr_a <= AW'(a);   wdata_a <= model[a];
      we_b <= 1; addr_b <= AW'(a+1); wdata_b <= model[a+1];
      @(posedge clk);
    end
    we_a <= 0; we_b <= 0;
    for (int t = 0; t < 200; t++) begin
      int a, b;
      a = $urandom % MB; b = $urandom % MB;
      addr_a <= AW'(a); addr_b <= AW'(b);
      @(posedge clk);
      @(negedge clk);
      checks += 2;
      if (rdata_a != model[a]) failures++;
      if (rdata_b != model[b]) failures++;
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
