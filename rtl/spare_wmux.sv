// spare_wmux -- input multiplexers of the spare columns.
//
// One 2:1 multiplexer per spare column, controlled by that spare's EN signal
// from the fuse block. EN = 0 (spare unused): the spare is written with its
// extra check bit from the check bit generator. EN = 1 (spare used for
// repair): the spare is written with the bit of the normal word at the column
// it replaces, selected by the one-hot redundancy signal of that spare; a
// spare that is only marked defective is written with 0. Only the spare
// inputs are multiplexed; the normal columns are written directly.
// Purely combinational.
module spare_wmux #(
  parameter int N = secded_pkg::N,
  parameter int S = secded_pkg::S
) (
  input  logic [N-1:0]        wword,      // normal word: data and base check bits
  input  logic [S-1:0]        chk_x,      // extra check bits
  input  logic [S-1:0][N-1:0] repl,       // spare s replaces column p
  input  logic [S-1:0]        spare_en,
  output logic [S-1:0]        spare_w
);
  always_comb
    for (int s = 0; s < S; s++)
      spare_w[s] = spare_en[s] ? |(wword & repl[s]) : chk_x[s];
endmodule
