// tb_syndrome_gen -- self-checking test of the syndrome generator.
//
// Random data and check inputs: the syndrome must equal the H-matrix product
// of the data (computed here) XOR the check inputs. A correctly encoded word
// must give a zero syndrome, and a single flipped data bit j must give the
// syndrome equal to column j of H.
module tb_syndrome_gen;
  import secded_pkg::*;

  logic [K-1:0]  data;
  logic [RT-1:0] chk, syn;
  int checks = 0, failures = 0;

  syndrome_gen dut (.data(data), .chk(chk), .syn(syn));

  function automatic logic [RT-1:0] enc(input logic [K-1:0] d);
    logic [RT-1:0] r;
    r = '0;
    for (int i = 0; i < RT; i++)
      for (int j = 0; j < K; j++) r[i] = r[i] ^ (H_DATA[i][j] & d[j]);
    return r;
  endfunction

  task automatic expect_syn(input logic [RT-1:0] exp, input string what);
    #1;
    checks++;
    if (syn !== exp) begin
      failures++;
      $display("FAIL %s: data=%h chk=%b syn=%b exp=%b", what, data, chk, syn, exp);
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
    logic [K-1:0] d;
    for (int n = 0; n < 500; n++) begin
      d = K'($urandom);
      data = d;
      chk = RT'($urandom);
      expect_syn(enc(d) ^ chk, "random");
      chk = enc(d);
      expect_syn('0, "codeword");
      for (int j = 0; j < K; j += 5) begin
        data = d ^ (K'(1) << j);
        expect_syn(h_col(j), "single");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
