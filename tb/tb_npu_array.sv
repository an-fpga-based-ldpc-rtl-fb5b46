// tb_npu_array - checks the block datapath around the node processors.
//
// Layers of 1..MAX_DEG blocks with random shifts, random LLRs, random stored
// messages and random syndrome words are streamed one block per cycle, with
// occasional idle cycles between layers and the first-iteration flag set on
// some layers. For every block the bench forms the expected result itself:
//   M[c]   = LLR[c] - E_old[c]   (E_old taken as 0 on a first iteration)
//   row r of the block sees column (r + shift) mod P,
//   E_new of row r = sign * Psi(sum Psi|M| - Psi|M_own|) over the layer,
//     with the sign chosen so that the hard bits (1 for M >= 0) meet the
//     row's syndrome bit,
//   E_new is written back in column order, LLR_new[c] = M[c] + E_new[c].
// E_new is compared with a tolerance (exact Psi in real arithmetic), LLR_new
// must equal M + the E_new the unit wrote, bit for bit. Each result must
// appear exactly LAT = MAX_DEG + 16 cycles after its block, with its tag.
//
// The stimulus and the reference model are this bench's own; the behaviour
// they check is the one described at the top of the unit under test.

module tb_npu_array;
  import ldpc_pkg::*;
  localparam int unsigned P = 8, MAX_DEG = 4, TAGW = 8, OW = $clog2(P);
  localparam int unsigned LAT = MAX_DEG + 16;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  logic rst_n, in_valid, in_first, in_last, in_first_iter;
  logic [OW-1:0]   in_off;
  logic [TAGW-1:0] in_tag;
  llr_t            llr_rd [P];
  llr_t            e_rd   [P];
  logic [P-1:0]    syn_rd;
  logic            out_valid;
  logic [TAGW-1:0] out_tag;
  llr_t            llr_wr [P];
  llr_t            e_wr   [P];
  npu_array #(.P(P), .MAX_DEG(MAX_DEG), .TAGW(TAGW)) dut (.*);

  function automatic real psi(input real x);
    real a;
    a = (x < 0) ? -x : x;
    if (a < 1.0 / 8192.0) a = 1.0 / 8192.0;
    return -$ln($tanh(a / 2.0));
  endfunction

  // expected results, indexed by tag (fewer than 256 blocks in flight)
  int  x_t [256];
  int  x_m [256][P];     // M in column order, integer LSBs
  real x_e [256][P];     // expected E_new in column order
  int  q [$];            // tags in issue order

  int checks = 0, failures = 0, cyc = 0;
  always @(negedge clk) cyc++;

  always @(posedge clk) if (rst_n && out_valid) begin
    int tg;
    checks++;
    if (q.size() == 0) begin
      failures++;
      $display("unexpected output");
    end else begin
      tg = q.pop_front();
      if (cyc - x_t[tg] != LAT + 1 || int'(out_tag) != tg) begin
        failures++;
        $display("tag %0d exp %0d, latency %0d", out_tag, tg, cyc - x_t[tg]);
      end
      for (int c = 0; c < P; c++) begin
        real g, tol;
        int  l;
        checks += 2;
        g = real'(e_wr[c]) / 8192.0;
        tol = 0.03 + 0.05 * ((x_e[tg][c] < 0) ? -x_e[tg][c] : x_e[tg][c]);
        if (g - x_e[tg][c] > tol || x_e[tg][c] - g > tol) begin
          if (!((g < 0) == (x_e[tg][c] < 0) && psi(g) - psi(x_e[tg][c]) < 0.004 &&
                psi(x_e[tg][c]) - psi(g) < 0.004)) begin
            failures++;
            if (failures < 10) $display("block %0d col %0d: E %f exp %f", tg, c, g, x_e[tg][c]);
          end
        end
        l = x_m[tg][c] + int'(e_wr[c]);
        if (l > int'(LLR_MAX)) l = int'(LLR_MAX);
        if (l < -int'(LLR_MAX)) l = -int'(LLR_MAX);
        if (int'(llr_wr[c]) != l) begin
          failures++;
          if (failures < 10) $display("block %0d col %0d: LLR %0d exp %0d", tg, c, llr_wr[c], l);
        end
      end
    end
  end

  initial begin
    int tag = 0;
    rst_n = 0; in_valid = 0; in_first = 0; in_last = 0; in_first_iter = 0;
    in_off = '0; in_tag = '0; syn_rd = '0;
    for (int c = 0; c < P; c++) begin llr_rd[c] = '0; e_rd[c] = '0; end
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(posedge clk);
    for (int layer = 0; layer < 300; layer++) begin
      int d;
      bit fi;
      logic [P-1:0] syn;
      int   off [MAX_DEG];
      int   lr  [MAX_DEG][P];
      int   er  [MAX_DEG][P];
      int   m   [MAX_DEG][P];
      real  sum [P];
      bit   par [P];
      d   = 1 + $urandom % MAX_DEG;
      if (layer % 5 == 0) d = MAX_DEG;
      fi  = ($urandom % 4 == 0);
      syn = P'($urandom);
      for (int r = 0; r < P; r++) begin sum[r] = 0; par[r] = syn[r]; end
      for (int b = 0; b < d; b++) begin
        off[b] = $urandom % P;
        for (int c = 0; c < P; c++) begin
          lr[b][c] = int'($urandom % 80000) - 40000;
          er[b][c] = int'($urandom % 30000) - 15000;
          if (layer % 13 == 0) lr[b][c] = lr[b][c] * 6;
          m[b][c]  = lr[b][c] - (fi ? 0 : er[b][c]);
        end
        for (int r = 0; r < P; r++) begin
          int v;
          v = m[b][(r + off[b]) % P];
          sum[r] += psi(real'(v) / 8192.0);
          par[r] ^= (v >= 0);
        end
      end
      for (int b = 0; b < d; b++) begin
        x_t[tag] = cyc;
        for (int c = 0; c < P; c++) x_m[tag][c] = m[b][c];
        for (int r = 0; r < P; r++) begin
          int  c;
          real mag;
          bit  pos;
          c   = (r + off[b]) % P;
          mag = psi(sum[r] - psi(real'(m[b][c]) / 8192.0));
          pos = par[r] ^ (m[b][c] >= 0);
          if (mag > 31.9) mag = 31.9;
          x_e[tag][c] = pos ? mag : -mag;
        end
        q.push_back(tag);
        in_valid <= 1; in_first <= (b == 0); in_last <= (b == d - 1);
        in_first_iter <= fi; in_off <= OW'(off[b]); in_tag <= TAGW'(tag);
        syn_rd <= (b == 0) ? syn : P'($urandom);   // only valid with the first block
        for (int c = 0; c < P; c++) begin
          llr_rd[c] <= llr_t'(lr[b][c]);
          e_rd[c]   <= llr_t'(er[b][c]);
        end
        tag = (tag + 1) % 256;
        @(posedge clk);
      end
      if (layer % 3 == 0) begin
        in_valid <= 0;
        repeat ($urandom % 3 + 1) @(posedge clk);
      end
    end
    in_valid <= 0;
    repeat (LAT + 5) @(posedge clk);
    checks++;
    if (q.size() != 0) failures++;
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
