// tb_spare_wmux -- self-checking test of the spare input multiplexers.
//
// Random normal words, extra check bits, EN patterns and repair columns: a
// spare with EN = 0 must receive its check bit, one with EN = 1 the bit of
// the normal column its redundancy signal selects (0 if none).
module tb_spare_wmux;
  import secded_pkg::*;

  logic [N-1:0]        wword;
  logic [S-1:0]        chk_x, en, spare_w;
  logic [S-1:0][N-1:0] repl;
  int checks = 0, failures = 0;

  spare_wmux dut (.wword(wword), .chk_x(chk_x), .repl(repl), .spare_en(en), .spare_w(spare_w));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int col [S];
    logic exp;
    for (int n = 0; n < 2000; n++) begin
      wword = N'($urandom);
      chk_x = S'($urandom);
      en = S'($urandom);
      for (int s = 0; s < S; s++) begin
        col[s] = $urandom_range(N);          // N means: no column
        repl[s] = (col[s] < N) ? N'(1) << col[s] : '0;
      end
      #1;
      for (int s = 0; s < S; s++) begin
        exp = !en[s] ? chk_x[s] : (col[s] < N ? wword[col[s]] : 1'b0);
        checks++;
        if (spare_w[s] !== exp) begin
          failures++;
          $display("FAIL spare %0d en=%b col=%0d got %b exp %b", s, en[s], col[s], spare_w[s], exp);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
