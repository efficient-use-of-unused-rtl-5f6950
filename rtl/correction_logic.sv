// correction_logic -- single-error correction for the variable-length code.
//
// The code in force has the base rows 0..R-1 plus the extra rows of the
// spares that hold check bits (spare_en = 0). A single-bit error produces a
// syndrome equal to the H column of the erroneous bit restricted to those
// rows. Each data column is compared with the gated syndrome and the matching
// data bit is inverted; a match with a check column (base or active extra)
// means the data is already correct. A non-zero syndrome matching no column
// is flagged uncorrectable (double errors, and the triple errors the extra
// rows unmask). Purely combinational.
module correction_logic #(
  parameter int KD = secded_pkg::K,
  parameter int R  = secded_pkg::R,
  parameter int S  = secded_pkg::S,
  parameter logic [R+S-1:0][KD-1:0] H = secded_pkg::H_DATA
) (
  input  logic [KD-1:0]  data_in,
  input  logic [R+S-1:0] syn_g,       // syndrome, inactive spare bits zero
  input  logic [S-1:0]   spare_en,    // 1: spare holds no check bit
  output logic [KD-1:0]  data_out,
  output logic           corrected,   // one bit in error, located
  output logic           uncorrectable
);
  localparam int NR = R + S;

  logic [NR-1:0] active;
  logic [KD-1:0] flip;
  logic          chk_hit;

  assign active = {~spare_en, {R{1'b1}}};

  always_comb begin
    logic [NR-1:0] col;
    for (int j = 0; j < KD; j++) begin
      for (int r = 0; r < NR; r++) col[r] = H[r][j];
      flip[j] = (syn_g != '0) && (syn_g == (col & active));
    end
    chk_hit = 1'b0;
    for (int r = 0; r < NR; r++)
      if (active[r] && syn_g == (NR'(1) << r)) chk_hit = 1'b1;
  end

  assign data_out      = data_in ^ flip;
  assign corrected     = (|flip) | chk_hit;
  assign uncorrectable = (syn_g != '0) && !corrected;
endmodule
