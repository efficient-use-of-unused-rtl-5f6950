// tb_check_bit_gen -- self-checking test of the check bit generator.
//
// Applies walking-one and random data words and compares all nine check bits
// with the products of the H-matrix rows computed here bit by bit. Also
// checks that data plus check bits form a codeword (H . C = 0 over the
// extended matrix with its unit check columns).
module tb_check_bit_gen;
  import secded_pkg::*;

  logic [K-1:0]  data;
  logic [RT-1:0] chk;
  int checks = 0, failures = 0;

  check_bit_gen dut (.data(data), .chk(chk));

  function automatic logic [RT-1:0] ref_chk(input logic [K-1:0] d);
    logic [RT-1:0] r;
    r = '0;
    for (int i = 0; i < RT; i++)
      for (int j = 0; j < K; j++) r[i] = r[i] ^ (H_DATA[i][j] & d[j]);
    return r;
  endfunction

  task automatic apply(input logic [K-1:0] d);
    logic [RT-1:0] s;
    data = d;
    #1;
    checks++;
    if (chk !== ref_chk(d)) begin
      failures++;
      $display("FAIL data=%h chk=%b exp=%b", d, chk, ref_chk(d));
    end
    // syndrome of the full codeword must be zero
    s = chk;
    for (int j = 0; j < K; j++) if (d[j]) s = s ^ h_col(j);
    checks++;
    if (s != '0) begin
      failures++;
      $display("FAIL codeword syndrome %b", s);
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
    apply('0);
    for (int j = 0; j < K; j++) apply(K'(1) << j);
    for (int n = 0; n < 1000; n++) apply(K'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
