// spare_memory -- memory array with N normal and S spare columns.
//
// DEPTH words; each word has N normal bit columns (data and base check bits)
// and S spare bit columns. Synchronous single port: on a clock edge with a
// write enable, the enabled normal columns and spare columns of `addr` take
// the write values (per-column enables); with `re`, both parts of `addr` are
// read and appear on rd_n / rd_s after that edge (one cycle latency), and
// hold otherwise. Contents are not reset.
module spare_memory #(
  parameter int N     = secded_pkg::N,
  parameter int S     = secded_pkg::S,
  parameter int DEPTH = 1024,
  parameter int AD    = $clog2(DEPTH)
) (
  input  logic          clk,
  input  logic [AD-1:0] addr,
  input  logic          re,
  input  logic [N-1:0]  we_n,
  input  logic [N-1:0]  wd_n,
  input  logic [S-1:0]  we_s,
  input  logic [S-1:0]  wd_s,
  output logic [N-1:0]  rd_n,
  output logic [S-1:0]  rd_s
);
  logic [N-1:0] mem_n [DEPTH];
  logic [S-1:0] mem_s [DEPTH];

  always_ff @(posedge clk) begin
    for (int p = 0; p < N; p++) if (we_n[p]) mem_n[addr][p] <= wd_n[p];
    for (int s = 0; s < S; s++) if (we_s[s]) mem_s[addr][s] <= wd_s[s];
    if (re) begin
      rd_n <= mem_n[addr];
      rd_s <= mem_s[addr];
    end
  end
endmodule
