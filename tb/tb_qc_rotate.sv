// tb_qc_rotate - checks both directions of the cyclic routing network.
//
// For every offset and random data it checks row order out[r] = in[(r+o)%P]
// (forward) and column order out[c] = in[(c-o)%P] (inverse), and that the
// inverse undoes the forward rotation.
//
// The stimulus and the reference model are this bench's own; the behaviour
// they check is the one described at the top of the unit under test.

module tb_qc_rotate;
  localparam int unsigned P = 12;
  localparam int unsigned WD = 7;
  logic [WD-1:0] din [P], fwd [P], back [P];
  logic [$clog2(P)-1:0] off;
  int checks = 0, failures = 0;

  qc_rotate #(.P(P), .WIDTH(WD), .INVERSE(1'b0)) u_f (.din(din), .off(off), .dout(fwd));
  qc_rotate #(.P(P), .WIDTH(WD), .INVERSE(1'b1)) u_i (.din(fwd), .off(off), .dout(back));

  initial begin
    for (int t = 0; t < 50; t++)
      for (int o = 0; o < P; o++) begin
        for (int i = 0; i < P; i++) din[i] = WD'($urandom);
        off = $clog2(P)'(o);
        #1;
        for (int r = 0; r < P; r++) begin
          checks += 2;
          if (fwd[r] != din[(r + o) % P]) failures++;
          if (back[r] != din[r]) failures++;
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
