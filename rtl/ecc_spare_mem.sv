// ecc_spare_mem -- SEC-DED protected memory that turns unused repair spares
// into extra check bits.
//
// The memory stores each K-bit data word with R Hsiao check bits and has S
// spare columns for repair. Spares that production repair leaves unused store
// extra check bits; each one adds a row to the parity-check matrix and lowers
// the share of triple errors that are miscorrected. Repair state lives in
// fuses (block_a): per spare a USED flag with the address of the column it
// replaces, and a BAD flag. FA[s] = USED | BAD selects, through one 2:1
// multiplexer per spare input, whether spare s receives its extra check bit
// or the bit of the column it repairs. Only the spare inputs are multiplexed;
// repaired columns are steered internally (column_control), so the syndrome
// generator always sees the N normal bits in order plus the raw spare bits,
// and the syndrome bits of unavailable spares are gated off (error_detect).
//
// Interface and timing: fuses are programmed with a rising edge of prog[s]
// (values on prog_used / prog_bad / prog_addr) and sensed with a pulse on
// fuse_ctrl before use. A write (we) stores wdata at addr on the rising clock
// edge. A read (re) samples addr on a rising edge; one cycle later rvalid is
// 1 and rdata, err_detected, corrected and uncorrectable describe that word.
// rst_n (active low, synchronous) clears rvalid only.
//
// Follows the block diagram of the published architecture: check bit
// generator, fuse block A, spare input MUXes, memory with three spares,
// syndrome generator, & gates, error-detected OR and correction logic. The
// one-cycle read latency, the word depth, the separate BAD fuse and the
// uncorrectable flag are this design's own choices.
module ecc_spare_mem #(
  parameter int K     = secded_pkg::K,
  parameter int R     = secded_pkg::R,
  parameter int S     = secded_pkg::S,
  parameter logic [R+S-1:0][K-1:0] H = secded_pkg::H_DATA,
  parameter int DEPTH = 1024,
  parameter int AD    = $clog2(DEPTH),
  parameter int N     = K + R,
  parameter int AW    = $clog2(K + R)
) (
  input  logic                 clk,
  input  logic                 rst_n,
  // fuse programming and sensing
  input  logic                 fuse_ctrl,
  input  logic [S-1:0]         prog,
  input  logic [S-1:0]         prog_used,
  input  logic [S-1:0]         prog_bad,
  input  logic [S-1:0][AW-1:0] prog_addr,
  output logic [S-1:0]         fa,
  // memory port
  input  logic                 we,
  input  logic                 re,
  input  logic [AD-1:0]        addr,
  input  logic [K-1:0]         wdata,
  output logic                 rvalid,
  output logic [K-1:0]         rdata,
  output logic                 err_detected,
  output logic                 corrected,
  output logic                 uncorrectable
);
  localparam int NR = R + S;

  logic [NR-1:0]       chk;
  logic [N-1:0]        wword;
  logic [S-1:0]        spare_w;
  logic [S-1:0][N-1:0] repl;
  logic [N-1:0]        intr;
  logic [N-1:0]        we_n;
  logic [S-1:0]        we_s;
  logic [N-1:0]        rd_n_raw, rd_word;
  logic [S-1:0]        rd_s_raw;
  logic [NR-1:0]       syn, syn_g;

  // write path
  check_bit_gen #(.KD(K), .NR(NR), .H(H)) u_cbg (.data(wdata), .chk(chk));

  assign wword = {chk[R-1:0], wdata};

  block_a #(.N(N), .S(S), .AW(AW)) u_block_a (
    .fuse_ctrl(fuse_ctrl), .prog(prog), .prog_used(prog_used), .prog_bad(prog_bad),
    .prog_addr(prog_addr), .fa(fa), .repl(repl), .intr(intr));

  spare_wmux #(.N(N), .S(S)) u_mux (
    .wword(wword), .chk_x(chk[NR-1:R]), .repl(repl), .spare_en(fa), .spare_w(spare_w));

  column_control #(.N(N), .S(S)) u_col (
    .we(we), .repl(repl), .intr(intr), .we_n(we_n), .we_s(we_s),
    .rd_n_raw(rd_n_raw), .rd_s_raw(rd_s_raw), .rd_word(rd_word));

  spare_memory #(.N(N), .S(S), .DEPTH(DEPTH), .AD(AD)) u_mem (
    .clk(clk), .addr(addr), .re(re), .we_n(we_n), .wd_n(wword), .we_s(we_s),
    .wd_s(spare_w), .rd_n(rd_n_raw), .rd_s(rd_s_raw));

  // read path
  syndrome_gen #(.KD(K), .NR(NR), .H(H)) u_sg (
    .data(rd_word[K-1:0]), .chk({rd_s_raw, rd_word[N-1:K]}), .syn(syn));

  error_detect #(.R(R), .S(S)) u_ed (
    .syn(syn), .spare_en(fa), .syn_g(syn_g), .err(err_detected));

  correction_logic #(.KD(K), .R(R), .S(S), .H(H)) u_cl (
    .data_in(rd_word[K-1:0]), .syn_g(syn_g), .spare_en(fa), .data_out(rdata),
    .corrected(corrected), .uncorrectable(uncorrectable));

  always_ff @(posedge clk)
    if (!rst_n) rvalid <= 1'b0;
    else        rvalid <= re;

endmodule
