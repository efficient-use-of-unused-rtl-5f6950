// block_a -- fuse-based repair block of the spare-column memory.
//
// One fuse box and one redundancy signal generator per spare column, plus the
// normal line interruption. Outputs, per spare, the EN signal FA (1 = spare
// used for repair or defective, 0 = spare free to hold an extra check bit),
// the one-hot column it replaces, and the mask of interrupted normal columns.
// Spares are meant to be used for repair from the highest one down (spare S
// first), so free spares are always the low ones; the block does not enforce
// this, it reports whatever the fuses hold. Fuses are sensed by fuse_ctrl.
module block_a #(
  parameter int N  = secded_pkg::N,
  parameter int S  = secded_pkg::S,
  parameter int AW = $clog2(secded_pkg::N)
) (
  input  logic                 fuse_ctrl,
  input  logic [S-1:0]         prog,
  input  logic [S-1:0]         prog_used,
  input  logic [S-1:0]         prog_bad,
  input  logic [S-1:0][AW-1:0] prog_addr,
  output logic [S-1:0]         fa,
  output logic [S-1:0][N-1:0]  repl,
  output logic [N-1:0]         intr
);
  for (genvar s = 0; s < S; s++) begin : g_spare
    logic          used;
    logic [AW-1:0] addr;

    fuse_box #(.AW(AW)) u_fb (
      .fuse_ctrl(fuse_ctrl), .prog(prog[s]), .prog_used(prog_used[s]),
      .prog_bad(prog_bad[s]), .prog_addr(prog_addr[s]),
      .used(used), .addr(addr), .en(fa[s]));

    redundancy_sig_gen #(.N(N), .AW(AW)) u_rsg (.used(used), .addr(addr), .repl(repl[s]));
  end

  normal_line_interrupt #(.N(N), .S(S)) u_nli (.repl(repl), .intr(intr));
endmodule
