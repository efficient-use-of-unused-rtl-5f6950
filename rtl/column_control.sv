// column_control -- steers normal and spare columns of the memory.
//
// Write side: a normal column is written unless it is interrupted (repaired);
// every spare column is written on each write, with whatever its input
// multiplexer selects. Read side: the N-bit word leaves in normal order, a
// repaired column p taking the value of the spare whose redundancy signal
// selects p. The raw spare outputs leave separately for the syndrome
// generator. Purely combinational.
module column_control #(
  parameter int N = secded_pkg::N,
  parameter int S = secded_pkg::S
) (
  input  logic                we,
  input  logic [S-1:0][N-1:0] repl,
  input  logic [N-1:0]        intr,
  output logic [N-1:0]        we_n,
  output logic [S-1:0]        we_s,
  input  logic [N-1:0]        rd_n_raw,
  input  logic [S-1:0]        rd_s_raw,
  output logic [N-1:0]        rd_word
);
  assign we_n = {N{we}} & ~intr;
  assign we_s = {S{we}};

  always_comb begin
    for (int p = 0; p < N; p++) begin
      rd_word[p] = intr[p] ? 1'b0 : rd_n_raw[p];
      for (int s = 0; s < S; s++)
        if (repl[s][p]) rd_word[p] = rd_word[p] | rd_s_raw[s];
    end
  end
endmodule
