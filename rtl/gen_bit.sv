// gen_bit - output of the decoded bit sequence.
//
// After a successful decision the unit reads the LLR memory one block column
// per cycle and turns the sign bits into bits: x = 1 for a non-negative LLR
// (sign bit 0), x = 0 otherwise. Each output word holds the P bits of block
// column out_idx; bit i is variable out_idx*P + i. start is a one-cycle
// pulse; the first word appears three cycles later and one word follows per
// cycle; done pulses with the last word.
//
// The source design names the unit and the hard-decision rule; the output
// format (one P-bit word per cycle with its column index) is this design's.

module gen_bit #(
  parameter int unsigned P  = 64,
  parameter int unsigned NB = 5468,
  localparam int unsigned CW = $clog2(NB)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,
  input  logic [CW:0]   n_cols,
  output logic [CW-1:0] llr_raddr,
  input  logic [P-1:0]  llr_sign,
  output logic          out_valid,
  output logic [CW-1:0] out_idx,
  output logic [P-1:0]  out_bits,
  output logic          done
);

  logic          running, v1, last1;
  logic [CW:0]   cnt;
  logic [CW-1:0] idx1;

  assign llr_raddr = cnt[CW-1:0];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      running   <= 1'b0;
      cnt       <= '0;
      v1        <= 1'b0;
      last1     <= 1'b0;
      idx1      <= '0;
      out_valid <= 1'b0;
      out_idx   <= '0;
      out_bits  <= '0;
      done      <= 1'b0;
    end else begin
      v1    <= running;
      last1 <= running && (cnt == n_cols - 1'b1);
      idx1  <= cnt[CW-1:0];
      if (start) begin
        running <= (n_cols != 0);
        cnt     <= '0;
      end else if (running) begin
        if (cnt == n_cols - 1'b1) running <= 1'b0;
        cnt <= cnt + 1'b1;
      end
      out_valid <= v1;
      out_idx   <= idx1;
      if (v1) out_bits <= ~llr_sign;
      done      <= v1 && last1;
    end
  end

endmodule
