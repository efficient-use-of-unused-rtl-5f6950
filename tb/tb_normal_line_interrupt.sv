// tb_normal_line_interrupt -- self-checking test of the normal line interruption.
//
// Random one-hot or empty redundancy signals for each spare: a column must be
// interrupted exactly when some spare selects it.
module tb_normal_line_interrupt;
  import secded_pkg::*;

  logic [S-1:0][N-1:0] repl;
  logic [N-1:0]        intr;
  int checks = 0, failures = 0;

  normal_line_interrupt dut (.repl(repl), .intr(intr));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int c [S];
    bit hit;
    for (int n = 0; n < 1000; n++) begin
      for (int s = 0; s < S; s++) begin
        c[s] = $urandom_range(N);
        repl[s] = (c[s] < N) ? N'(1) << c[s] : '0;
      end
      #1;
      for (int p = 0; p < N; p++) begin
        hit = 0;
        for (int s = 0; s < S; s++) if (c[s] == p) hit = 1;
        checks++;
        if (intr[p] !== hit) begin
          failures++;
          $display("FAIL column %0d intr=%b", p, intr[p]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
