// ldpc_decoder - layered sum-product decoder for ultra-long quasi-cyclic LDPC
// codes with side information (syndrome decoding).
//
// The decoder recovers a bit sequence X from noisy soft information about it
// (one probability pair P0, P1 per bit) and the syndrome S = H X^T of the
// true sequence. The parity-check matrix H is quasi-cyclic: every non-zero
// entry of a small base matrix stands for a P x P cyclically shifted
// identity. P node processors work on the P rows of one block row (a layer)
// at once, and the layer's non-zero blocks stream through them at one block
// per clock cycle with no idle cycles between nodes, layers or iterations.
//
// Blocks and data flow:
//   llr_ini    P0/P1 -> channel LLR, written serially into llr_mem
//   pcm_mem    column and offset of each non-zero block, read by a counter
//   llr_mem    P banks of posterior LLRs, address = block column
//   mes_mem    P banks of check-to-variable messages, address = block number
//   syn_mem    syndrome, one P-bit word per layer (true dual port)
//   npu_array  M = LLR - E, routing, P npu lanes, routing back, LLR = M + E
//   decision   hard bits vs. syndrome, stops at the first failing layer,
//              gives up at max_iter iterations
//   gen_bit    reads out X, P bits per cycle
//   ldpc_ctrl  sequencing and read addresses
//
// Use: load the matrix (pcm_*), the syndrome (syn_*) and the probabilities
// (p_*, in variable order after a p_clear pulse) while idle, set n_blocks,
// n_cols and max_iter, pulse start. done pulses at the end; when success is
// set the decoded word has been streamed on out_valid/out_idx/out_bits (bit i
// of word k is variable k*P + i, 1 where the LLR is non-negative).
//
// Matrix rule: the node-processor pipeline writes a block back LAT_WB =
// MAX_DEG + 16 cycles after reading it, so two uses of one block column must
// be at least LAT_WB + 2 blocks apart in processing order within an
// iteration, and a layer may have at most MAX_DEG blocks.
//
// Default sizes are the two codes of the source design held by one instance:
// P = q = 64, up to 5468 block columns (349,952 bits), 4840 layers and 19,617
// non-zero blocks; the message word is (1,5,13).
module ldpc_decoder
  import ldpc_pkg::*;
#(
  parameter int unsigned P       = 64,
  parameter int unsigned NB      = 5468,
  parameter int unsigned MB      = 4840,
  parameter int unsigned WB      = 19617,
  parameter int unsigned MAX_DEG = 16,
  parameter int unsigned IW      = 8,
  localparam int unsigned BAW    = $clog2(WB),
  localparam int unsigned CW     = $clog2(NB),
  localparam int unsigned LW     = $clog2(MB),
  localparam int unsigned OW     = (P > 1) ? $clog2(P) : 1
) (
  input  logic           clk,
  input  logic           rst_n,
  // configuration
  input  logic [BAW:0]   n_blocks,
  input  logic [CW:0]    n_cols,
  input  logic [IW-1:0]  max_iter,
  // matrix load
  input  logic           pcm_we,
  input  logic [BAW-1:0] pcm_waddr,
  input  logic           pcm_wlast,
  input  logic [CW-1:0]  pcm_wcol,
  input  logic [OW-1:0]  pcm_woff,
  // syndrome load
  input  logic           syn_we,
  input  logic [LW-1:0]  syn_waddr,
  input  logic [P-1:0]   syn_wdata,
  // soft input
  input  logic           p_clear,
  input  logic           p_valid,
  input  logic [15:0]    p0,
  input  logic [15:0]    p1,
  // control and status
  input  logic           start,
  output logic           busy,
  output logic           done,
  output logic           success,
  output logic [IW-1:0]  iters,
  output logic [LW:0]    dec_layers_ok,   // layers matched by the last decision pass
  // decoded output
  output logic           out_valid,
  output logic [CW-1:0]  out_idx,
  output logic [P-1:0]   out_bits
);

  localparam int unsigned TAGW = CW + BAW;

  // ---------------- memories ----------------
  logic [BAW-1:0] pcm_raddr, ctl_pcm_raddr, dec_pcm_raddr;
  logic           pcm_last;
  logic [CW-1:0]  pcm_col;
  logic [OW-1:0]  pcm_off;
  pcm_mem #(.WB(WB), .CW(CW), .OW(OW)) u_pcm (
    .clk(clk), .we(pcm_we), .waddr(pcm_waddr), .wlast(pcm_wlast), .wcol(pcm_wcol),
    .woff(pcm_woff), .raddr(pcm_raddr), .rlast(pcm_last), .rcol(pcm_col), .roff(pcm_off));

  logic [P-1:0]   llr_we, ini_we;
  logic [CW-1:0]  llr_waddr, ini_waddr, llr_raddr, ctl_llr_raddr, dec_llr_raddr, gb_llr_raddr;
  llr_t           llr_wdata [P], llr_rdata [P], arr_llr_wr [P], ini_wdata;
  logic [P-1:0]   llr_sign;
  llr_mem #(.P(P), .NB(NB)) u_llr (
    .clk(clk), .we(llr_we), .waddr(llr_waddr), .wdata(llr_wdata),
    .raddr(llr_raddr), .rdata(llr_rdata));
  always_comb for (int i = 0; i < P; i++) llr_sign[i] = llr_rdata[i][W-1];

  logic [BAW-1:0] mes_raddr;
  llr_t           mes_rdata [P], arr_e_wr [P];
  logic           arr_valid;
  logic [TAGW-1:0] arr_tag;
  mes_mem #(.P(P), .WB(WB)) u_mes (
    .clk(clk), .we(arr_valid), .waddr(arr_tag[BAW-1:0]), .wdata(arr_e_wr),
    .raddr(mes_raddr), .rdata(mes_rdata));

  logic [LW-1:0]  ctl_syn_raddr, dec_syn_raddr;
  logic [P-1:0]   syn_rdata_a, syn_rdata_b;
  syn_mem #(.P(P), .MB(MB)) u_syn (
    .clk(clk),
    .we_a(syn_we), .addr_a(syn_we ? syn_waddr : ctl_syn_raddr), .wdata_a(syn_wdata),
    .rdata_a(syn_rdata_a),
    .we_b(1'b0), .addr_b(dec_syn_raddr), .wdata_b('0), .rdata_b(syn_rdata_b));

  // ---------------- LLR initialisation ----------------
  llr_ini #(.P(P), .NB(NB)) u_ini (
    .clk(clk), .rst_n(rst_n), .clear(p_clear), .p_valid(p_valid), .p0(p0), .p1(p1),
    .we(ini_we), .waddr(ini_waddr), .wdata(ini_wdata));

  // ---------------- control ----------------
  logic          npu_valid, npu_first, npu_last, npu_first_iter;
  logic [OW-1:0] npu_off;
  logic [TAGW-1:0] npu_tag;
  logic          dec_start, dec_done, gb_start, gb_done;
  dec_result_t   dec_result;
  logic          iter_phase, dec_phase, out_phase;

  ldpc_ctrl #(.P(P), .WB(WB), .NB(NB), .MB(MB), .IW(IW)) u_ctrl (
    .clk(clk), .rst_n(rst_n), .start(start), .n_blocks(n_blocks),
    .pcm_raddr(ctl_pcm_raddr), .pcm_last(pcm_last), .pcm_col(pcm_col), .pcm_off(pcm_off),
    .llr_raddr(ctl_llr_raddr), .mes_raddr(mes_raddr), .syn_raddr(ctl_syn_raddr),
    .npu_valid(npu_valid), .npu_first(npu_first), .npu_last(npu_last),
    .npu_first_iter(npu_first_iter), .npu_off(npu_off), .npu_tag(npu_tag),
    .npu_out_valid(arr_valid),
    .dec_start(dec_start), .dec_done(dec_done), .dec_result(dec_result), .iters(iters),
    .gb_start(gb_start), .gb_done(gb_done),
    .iter_phase(iter_phase), .dec_phase(dec_phase), .out_phase(out_phase),
    .busy(busy), .done(done), .success(success));

  // ---------------- node processors ----------------
  npu_array #(.P(P), .MAX_DEG(MAX_DEG), .TAGW(TAGW)) u_npus (
    .clk(clk), .rst_n(rst_n),
    .in_valid(npu_valid), .in_first(npu_first), .in_last(npu_last),
    .in_first_iter(npu_first_iter), .in_off(npu_off), .in_tag(npu_tag),
    .llr_rd(llr_rdata), .e_rd(mes_rdata), .syn_rd(syn_rdata_a),
    .out_valid(arr_valid), .out_tag(arr_tag), .llr_wr(arr_llr_wr), .e_wr(arr_e_wr));

  // ---------------- decision and output ----------------
  decision #(.P(P), .WB(WB), .NB(NB), .MB(MB), .IW(IW)) u_dec (
    .clk(clk), .rst_n(rst_n), .start(dec_start), .n_blocks(n_blocks),
    .iters_done(iters), .max_iter(max_iter),
    .pcm_raddr(dec_pcm_raddr), .pcm_last(pcm_last), .pcm_col(pcm_col), .pcm_off(pcm_off),
    .llr_raddr(dec_llr_raddr), .llr_sign(llr_sign),
    .syn_raddr(dec_syn_raddr), .syn_rdata(syn_rdata_b),
    .done(dec_done), .result(dec_result), .layers_ok(dec_layers_ok));

  logic gb_valid;
  gen_bit #(.P(P), .NB(NB)) u_gb (
    .clk(clk), .rst_n(rst_n), .start(gb_start), .n_cols(n_cols),
    .llr_raddr(gb_llr_raddr), .llr_sign(llr_sign),
    .out_valid(gb_valid), .out_idx(out_idx), .out_bits(out_bits), .done(gb_done));
  assign out_valid = gb_valid;

  // ---------------- port sharing ----------------
  assign pcm_raddr = dec_phase ? dec_pcm_raddr : ctl_pcm_raddr;
  assign llr_raddr = dec_phase ? dec_llr_raddr : (out_phase ? gb_llr_raddr : ctl_llr_raddr);

  always_comb begin
    if (iter_phase) begin
      llr_we    = {P{arr_valid}};
      llr_waddr = arr_tag[TAGW-1:BAW];
      for (int i = 0; i < P; i++) llr_wdata[i] = arr_llr_wr[i];
    end else begin
      llr_we    = ini_we;
      llr_waddr = ini_waddr;
      for (int i = 0; i < P; i++) llr_wdata[i] = ini_wdata;
    end
  end

endmodule
