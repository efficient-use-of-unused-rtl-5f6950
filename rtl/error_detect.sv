// error_detect -- spare-bit gating and error-detected flag.
//
// Each extra syndrome bit (bits R..R+S-1, one per spare column) is ANDed
// with the inverse of that spare's EN signal from the fuse block: when EN is
// 1 the spare is used for repair (or is itself defective) and holds no check
// bit, so its syndrome bit is meaningless and forced to 0. The base syndrome
// bits pass unchanged. The error-detected flag is the OR of all gated
// syndrome bits. The gated syndrome also feeds the correction logic, so both
// see the same code. Purely combinational.
module error_detect #(
  parameter int R = secded_pkg::R,
  parameter int S = secded_pkg::S
) (
  input  logic [R+S-1:0] syn,
  input  logic [S-1:0]   spare_en,   // 1: spare used for repair / defective
  output logic [R+S-1:0] syn_g,
  output logic           err
);
  always_comb begin
    syn_g[R-1:0] = syn[R-1:0];
    for (int s = 0; s < S; s++) syn_g[R+s] = syn[R+s] & ~spare_en[s];
    err = |syn_g;
  end
endmodule
