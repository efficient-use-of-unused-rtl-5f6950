// normal_line_interrupt -- disables the normal columns that have been repaired.
//
// A normal column is interrupted when any spare's redundancy signal selects
// it: intr[p] is the OR over the spares of repl[s][p]. Purely combinational.
module normal_line_interrupt #(
  parameter int N = secded_pkg::N,
  parameter int S = secded_pkg::S
) (
  input  logic [S-1:0][N-1:0] repl,
  output logic [N-1:0]        intr
);
  always_comb begin
    intr = '0;
    for (int s = 0; s < S; s++) intr |= repl[s];
  end
endmodule
