// tb_ecc_spare_mem_wide -- runs ecc_spare_mem at 32 and 64 data bits, with 3
// spare columns each, and measures triple-error miscorrection for 3, 2, 1
// and 0 spares holding extra check bits (driver: wide_code_run).
//
// Neither width ships with the design, so the matrices are given here:
//  * 32 bits: a (39,32) Hsiao code, 7 base rows, 32 of the 35 weight-3
//    columns chosen so that row weights are 13 or 14, sorted by value;
//  * 64 bits: a (72,64) Hsiao code, 8 base rows, all 56 weight-3 columns
//    plus 8 weight-5 columns, every row of weight 26, sorted by value.
// Spare rows are filled by chunk selection, as for the 16-bit code, spare
// 1 first: chunks of 3 adjacent columns at 32 bits (10 chunks, columns 30
// and 31 stay 0, 2^10 choices) and of 4 columns at 64 bits (16 chunks,
// 2^16 choices), each time keeping the row with the fewest miscorrected
// triples. Expected miscorrected triples, for 0/1/2/3 spare rows:
//   32 bits: 5452/9139, 2592/9880, 1236/10660, 584/11480
//            (59.7 %, 26.2 %, 11.6 %, 5.1 %)
//   64 bits: 33568/59640, 16464/62196, 8096/64824, 4160/67525
//            (56.3 %, 26.5 %, 12.5 %, 6.2 %)
// The testbench checks these counts by injecting every triple error into
// the memory array and reading it back.
module tb_ecc_spare_mem_wide;
  localparam logic [9:0][31:0] H32 = '{
    32'h381c0e38,   // row 9: spare 3
    32'h0003f1f8,   // row 8: spare 2
    32'h07ff81c7,   // row 7: spare 1
    32'hfff80000, 32'hf007fc00, 32'h8f0703f0, 32'h48c4e38e,
    32'h04b29a6d, 32'h2268555b, 32'h11192cb7
  };
  localparam logic [10:0][63:0] H64 = '{
    64'h0ff00fff0f000f00,   // row 10: spare 3
    64'hff00ff0f0f00f0f0,   // row 9: spare 2
    64'h000f0f0ff0f00fff,   // row 8: spare 1
    64'hffffffc000000000, 64'hffc0003fffc00000, 64'hf03e003f003ff800,
    64'hc821e030f03e07f0, 64'h84111e288e31c78e, 64'h030899a449a9366d,
    64'h228455422564ad5b, 64'h624232c112c25cb7
  };
  localparam logic [3:0][31:0] MIS32 = '{32'd584, 32'd1236, 32'd2592, 32'd5452};
  localparam logic [3:0][31:0] MIS64 = '{32'd4160, 32'd8096, 32'd16464, 32'd33568};

  logic done32, done64;
  int   checks32, failures32, checks64, failures64;
  int   checks, failures;

  wide_code_run #(.K(32), .R(7), .S(3), .H(H32), .EXP_MIS(MIS32)) u_32 (
    .done(done32), .checks(checks32), .failures(failures32));
  wide_code_run #(.K(64), .R(8), .S(3), .H(H64), .EXP_MIS(MIS64)) u_64 (
    .done(done64), .checks(checks64), .failures(failures64));

  initial begin
    #20ms;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks32 + checks64, failures32 + failures64 + 1);
    $finish;
  end

  initial begin
    wait (done32 && done64);
    checks = checks32 + checks64;
    failures = failures32 + failures64;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
