// tb_column_control -- self-checking test of the column steering.
//
// Random repair assignments (distinct columns per spare) and random raw read
// values: repaired columns must read their spare, others their own column;
// write enables must skip interrupted columns and include every spare.
module tb_column_control;
  import secded_pkg::*;

  logic                we;
  logic [S-1:0][N-1:0] repl;
  logic [N-1:0]        intr, we_n, rd_n_raw, rd_word;
  logic [S-1:0]        we_s, rd_s_raw;
  int checks = 0, failures = 0;

  column_control dut (.we(we), .repl(repl), .intr(intr), .we_n(we_n), .we_s(we_s),
                      .rd_n_raw(rd_n_raw), .rd_s_raw(rd_s_raw), .rd_word(rd_word));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int c [S];
    logic [N-1:0] exp;
    for (int n = 0; n < 1000; n++) begin
      for (int s = 0; s < S; s++) begin
        c[s] = $urandom_range(N);
        for (int q = 0; q < s; q++) if (c[q] == c[s]) c[s] = N;   // keep distinct
        repl[s] = (c[s] < N) ? N'(1) << c[s] : '0;
      end
      intr = '0;
      for (int s = 0; s < S; s++) intr |= repl[s];
      we = 1'($urandom);
      rd_n_raw = N'($urandom);
      rd_s_raw = S'($urandom);
      #1;
      exp = rd_n_raw;
      for (int s = 0; s < S; s++) if (c[s] < N) exp[c[s]] = rd_s_raw[s];
      checks++;
      if (rd_word !== exp) begin
        failures++;
        $display("FAIL read: got %b exp %b", rd_word, exp);
      end
      checks++;
      if (we_n !== ({N{we}} & ~intr) || we_s !== {S{we}}) begin
        failures++;
        $display("FAIL write enables");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
