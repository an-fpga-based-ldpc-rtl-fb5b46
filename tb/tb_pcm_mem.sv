// tb_pcm_mem - writes random matrix words and reads them back in order,
// checking the one-cycle read latency against a model array.
//
// The stimulus and the reference model are this bench's own; the behaviour
// they check is the one described at the top of the unit under test.

module tb_pcm_mem;
  localparam int unsigned WB = 100, CW = 7, OW = 4, AW = $clog2(WB);
  logic clk = 1'b0;
  always #5 clk = ~clk;
  logic we, wlast, rlast;
  logic [AW-1:0] waddr, raddr;
  logic [CW-1:0] wcol, rcol;
  logic [OW-1:0] woff, roff;
  pcm_mem #(.WB(WB), .CW(CW), .OW(OW)) dut (.*);
  int checks = 0, failures = 0;
  logic [CW+OW:0] model [WB];
  initial begin
    we = 0; waddr = '0; raddr = '0; wlast = 0; wcol = '0; woff = '0;
    for (int a = 0; a < WB; a++) begin
      model[a] = (CW+OW+1)'($urandom);
      we <= 1; waddr <= AW'(a); {wlast, wcol, woff} <= model[a];
      @(posedge clk);
    end
    we <= 0;
    for (int t = 0; t < 300; t++) begin
      int a;
      a = $urandom % WB;
      raddr <= AW'(a);
      @(posedge clk);
      @(negedge clk);
      checks++;
      if ({rlast, rcol, roff} != model[a]) failures++;
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
