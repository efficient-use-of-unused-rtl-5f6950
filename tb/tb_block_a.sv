// tb_block_a -- self-checking test of the fuse-based repair block.
//
// Before sensing all spares are free (FA = 0, nothing replaced). Then spare 3
// is programmed to repair column 7, spare 2 is marked defective and spare 1
// is left intact; after a sense pulse FA must be 110, spare 3 must select
// column 7, spares 1 and 2 nothing, and only column 7 may be interrupted.
module tb_block_a;
  import secded_pkg::*;
  localparam int AW = $clog2(N);

  logic                 fuse_ctrl;
  logic [S-1:0]         prog, p_used, p_bad, fa;
  logic [S-1:0][AW-1:0] p_addr;
  logic [S-1:0][N-1:0]  repl;
  logic [N-1:0]         intr;
  int checks = 0, failures = 0;

  block_a dut (.fuse_ctrl(fuse_ctrl), .prog(prog), .prog_used(p_used), .prog_bad(p_bad),
               .prog_addr(p_addr), .fa(fa), .repl(repl), .intr(intr));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s: fa=%b intr=%b", what, fa, intr);
    end
  endtask

  initial begin
    #10000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    prog = '0;
    fuse_ctrl = 1'b0;
    p_used = 3'b100;
    p_bad = 3'b010;
    p_addr = '{AW'(7), AW'(0), AW'(0)};
    #5;
    fuse_ctrl = 1'b1;
    #5 fuse_ctrl = 1'b0;
    #1;
    check(fa == '0 && intr == '0 && repl == '0, "unprogrammed");
    prog = 3'b110;
    #5 prog = '0;
    #5 fuse_ctrl = 1'b1;
    #5 fuse_ctrl = 1'b0;
    #1;
    check(fa == 3'b110, "FA after sensing");
    check(repl[2] == (N'(1) << 7), "spare 3 selects column 7");
    check(repl[1] == '0 && repl[0] == '0, "spares 1 and 2 select nothing");
    check(intr == (N'(1) << 7), "only column 7 interrupted");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
