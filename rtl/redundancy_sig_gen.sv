// redundancy_sig_gen -- redundancy signal of one spare column.
//
// Compares every normal column address p (0..N-1) with the repair address
// held in the spare's fuse box; when the spare is marked used and the
// addresses match, repl[p] is 1, i.e. column p is served by this spare.
// The output is one-hot or zero. Purely combinational.
module redundancy_sig_gen #(
  parameter int N  = secded_pkg::N,
  parameter int AW = $clog2(secded_pkg::N)
) (
  input  logic          used,
  input  logic [AW-1:0] addr,
  output logic [N-1:0]  repl
);
  always_comb
    for (int p = 0; p < N; p++) repl[p] = used && (addr == AW'(p));
endmodule
