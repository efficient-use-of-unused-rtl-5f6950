// syndrome_gen -- syndrome generator of the spare-column SEC-DED memory.
//
// Computes S = H . W for a word read from memory: the data part of H applied
// to the read data bits (through the same kind of shared-term XOR network as
// the check bit generator), XORed with the check bits read back. The check
// inputs are the base check columns (bits 0..R-1) and the raw outputs of the
// spare columns (bits R..NR-1), which reach this block directly, whether or
// not a spare holds a check bit; the syndrome bits of spares used for repair
// are discarded downstream (error_detect). Purely combinational.
module syndrome_gen #(
  parameter int KD = secded_pkg::K,
  parameter int NR = secded_pkg::RT,
  parameter logic [NR-1:0][KD-1:0] H = secded_pkg::H_DATA
) (
  input  logic [KD-1:0] data,
  input  logic [NR-1:0] chk,
  output logic [NR-1:0] syn
);
  logic [NR-1:0] recomputed;

  xor_share_net #(.NI(KD), .NO(NR), .M(H)) u_net (.din(data), .dout(recomputed));

  assign syn = recomputed ^ chk;
endmodule
