// tb_xor_share_net -- self-checking test of the shared-term XOR network.
//
// Two instances: the default one (the 9-row extended H-matrix over 16 data
// bits) and one built from a small 6-output, 9-input example equation set.
// Random and walking-one inputs are applied; each output is compared with
// the matrix product computed here directly, bit by bit.
module tb_xor_share_net;
  import secded_pkg::*;

  localparam logic [5:0][8:0] EX = '{
    9'b100_100_100,   // O5 = b2 ^ b5 ^ b8
    9'b010_010_001,   // O4 = b0 ^ b4 ^ b7
    9'b001_000_111,   // O3 = b0 ^ b1 ^ b2 ^ b6
    9'b111_001_111,   // O2 = b0 ^ b1 ^ b2 ^ b3 ^ b6 ^ b7 ^ b8
    9'b111_111_000,   // O1 = b3 ^ b4 ^ b5 ^ b6 ^ b7 ^ b8
    9'b100_111_010    // O0 = b1 ^ b3 ^ b4 ^ b5 ^ b8
  };

  logic [K-1:0]  din;
  logic [RT-1:0] dout;
  logic [8:0]    exin;
  logic [5:0]    exout;
  int checks = 0, failures = 0;

  xor_share_net dut (.din(din), .dout(dout));
  xor_share_net #(.NI(9), .NO(6), .M(EX)) dut_ex (.din(exin), .dout(exout));

  function automatic logic [RT-1:0] ref_h(input logic [K-1:0] d);
    logic [RT-1:0] r;
    for (int i = 0; i < RT; i++) begin
      r[i] = 1'b0;
      for (int j = 0; j < K; j++) if (H_DATA[i][j]) r[i] ^= d[j];
    end
    return r;
  endfunction

  function automatic logic [5:0] ref_ex(input logic [8:0] b);
    return {b[2]^b[5]^b[8], b[0]^b[4]^b[7], b[0]^b[1]^b[2]^b[6],
            b[0]^b[1]^b[2]^b[3]^b[6]^b[7]^b[8], b[3]^b[4]^b[5]^b[6]^b[7]^b[8],
            b[1]^b[3]^b[4]^b[5]^b[8]};
  endfunction

  task automatic apply(input logic [K-1:0] d, input logic [8:0] e);
    din = d;
    exin = e;
    #1;
    checks++;
    if (dout !== ref_h(d)) begin
      failures++;
      $display("FAIL H: din=%h dout=%b exp=%b", d, dout, ref_h(d));
    end
    checks++;
    if (exout !== ref_ex(e)) begin
      failures++;
      $display("FAIL EX: in=%b out=%b exp=%b", e, exout, ref_ex(e));
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int j = 0; j < K; j++) apply(K'(1) << j, 9'(1) << (j % 9));
    for (int n = 0; n < 2000; n++) apply(K'($urandom), 9'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
