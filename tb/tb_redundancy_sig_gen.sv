// tb_redundancy_sig_gen -- self-checking test of the redundancy signal.
//
// Exhaustive over the repair address and the USED flag: the output must be
// the one-hot code of the address when used (zero for an address beyond the
// last column) and all zero otherwise.
module tb_redundancy_sig_gen;
  import secded_pkg::*;
  localparam int AW = $clog2(N);

  logic          used;
  logic [AW-1:0] addr;
  logic [N-1:0]  repl;
  int checks = 0, failures = 0;

  redundancy_sig_gen dut (.used(used), .addr(addr), .repl(repl));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [N-1:0] exp;
    for (int u = 0; u < 2; u++)
      for (int a = 0; a < (1 << AW); a++) begin
        used = u[0];
        addr = AW'(a);
        #1;
        exp = '0;
        if (u == 1 && a < N) exp[a] = 1'b1;
        checks++;
        if (repl !== exp) begin
          failures++;
          $display("FAIL used=%0d addr=%0d repl=%b", u, a, repl);
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
