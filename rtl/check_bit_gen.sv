// check_bit_gen -- check bit generator of the spare-column SEC-DED memory.
//
// Produces all NR check bits of a data word from the data part of the
// extended parity-check matrix H: bit r is the XOR of the data bits selected
// by row r. Bits 0..R-1 are the base Hsiao check bits, always stored in the
// memory's check columns; bits R..NR-1 are the extra check bits, one per
// spare column, which are stored only where that spare is not used for
// repair (the choice is made by the spare input multiplexers, not here).
// The equations are built as one shared-term XOR network (xor_share_net) so
// that common parts of the rows are computed once. Purely combinational.
module check_bit_gen #(
  parameter int KD = secded_pkg::K,
  parameter int NR = secded_pkg::RT,
  parameter logic [NR-1:0][KD-1:0] H = secded_pkg::H_DATA
) (
  input  logic [KD-1:0] data,
  output logic [NR-1:0] chk
);
  xor_share_net #(.NI(KD), .NO(NR), .M(H)) u_net (.din(data), .dout(chk));
endmodule
