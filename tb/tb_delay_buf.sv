// tb_delay_buf - checks that every word comes out exactly DELAY cycles later.
//
// The stimulus and the reference model are this bench's own; the behaviour
// they check is the one described at the top of the unit under test.

module tb_delay_buf;
  localparam int unsigned WD = 16;
  localparam int unsigned DELAY = 7;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  logic rst_n;
  logic [WD-1:0] din, dout;
  int checks = 0, failures = 0;
  delay_buf #(.WIDTH(WD), .DELAY(DELAY)) dut (.*);

  logic [WD-1:0] hist [$];
  initial begin
    rst_n = 0; din = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 500; t++) begin
      din <= WD'($urandom);
      @(posedge clk);
      hist.push_back(din);
      #1;
      if (hist.size() > DELAY) void'(hist.pop_front());
      if (hist.size() == DELAY) begin
        checks++;
        if (dout != hist[0]) failures++;
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
