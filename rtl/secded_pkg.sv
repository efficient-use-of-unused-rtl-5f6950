// secded_pkg -- sizes and parity-check matrix of the spare-column SEC-DED memory.
//
// The code protects K = 16 data bits with R = 6 base check bits (a (22,16)
// Hsiao code whose data columns all have weight three) and up to S = 3 extra
// check bits, one per unused spare column. Each extra check bit adds one row
// to the parity-check matrix H; its check column is the unit vector of that
// row, and the base check columns are zero in the extra rows.
//
// H_DATA holds the data part of H, one row per check bit: rows 0..R-1 are the
// base Hsiao rows, rows R..R+S-1 are the spare rows. Bit j of a row is data
// column j, so each literal is written with column 15 first.
//
// The six base rows are the published 16-bit Hsiao matrix. The spare rows are
// this design's own, filled spare by spare (spare 1 first) in two stages:
//  1. chunk selection: the row is made of whole chunks of three columns
//     that are runs of ones shared by the base rows (columns 0-2, 3-5, 6-8,
//     9-11 and 13-15; column 12 stays 0); of the 2^5 choices the one with
//     the fewest triple errors whose syndrome equals a column of H
//     (miscorrected triples) is kept;
//  2. boundary refinement: taking the chunks in the order 0-2, 3-5, 13-15,
//     9-11, 6-8, 12, the two columns on each side of a chunk boundary may
//     be kept, both set to 0 or both set to 1 (3^5 choices); the choice with
//     the fewest miscorrected triples is kept, provided the shared XOR
//     network (xor_share_net) gets no larger than after stage 1.
// Miscorrected triples over all codeword bits: 1008 of 1540 (65.5 %) with
// no spare row, 456 of 1771 (25.7 %) with one, 196 of 2024 (9.7 %) with two
// and 72 of 2300 (3.1 %) with three.
package secded_pkg;

  localparam int K  = 16;      // data bits
  localparam int R  = 6;       // base check bits (Hsiao rows)
  localparam int S  = 3;       // spare columns usable as extra check bits
  localparam int RT = R + S;   // rows of the extended H-matrix
  localparam int N  = K + R;   // normal columns of the memory word

  // Data part of the extended H-matrix, row r = check bit r.
  localparam logic [RT-1:0][K-1:0] H_DATA = '{
    16'b1100_1000_0100_1111,   // row 8: spare 3  1111001000010011
    16'b0010_0001_1111_1000,   // row 7: spare 2  0001111110000100
    16'b1100_0110_1001_0011,   // row 6: spare 1  1100100101100011
    16'b1001_1001_0011_1100,   // row 5: 0011110010011001
    16'b0011_1110_1000_1010,   // row 4: 0101000101111100
    16'b1110_1110_0110_0000,   // row 3: 0000011001110111
    16'b1110_0001_1101_0001,   // row 2: 1000101110000111
    16'b0001_0011_1100_0111,   // row 1: 1110001111001000
    16'b0100_0100_0011_1111    // row 0: 1111110000100010
  };

  // Column j of the data part of H (a vector over the RT rows).
  function automatic logic [RT-1:0] h_col(input int j);
    logic [RT-1:0] c;
    for (int r = 0; r < RT; r++) c[r] = H_DATA[r][j];
    return c;
  endfunction

endpackage
