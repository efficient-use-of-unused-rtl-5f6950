// tb_fuse_cell -- self-checking test of the fuse latch model.
//
// An intact fuse must give EN = 0 before and after sense pulses. After the
// fuse is blown, EN must stay 0 until the next FUSE_CTRL pulse, rise with it,
// and stay 1 after the pulse ends (keeper).
module tb_fuse_cell;
  logic prog, fuse_ctrl, en;
  int checks = 0, failures = 0;

  fuse_cell dut (.prog(prog), .fuse_ctrl(fuse_ctrl), .en(en));

  task automatic check_en(input logic exp, input string what);
    #1;
    checks++;
    if (en !== exp) begin
      failures++;
      $display("FAIL %s: en=%b exp=%b", what, en, exp);
    end
  endtask

  task automatic pulse_ctrl();
    fuse_ctrl = 1'b1;
    #5;
    fuse_ctrl = 1'b0;
  endtask

  initial begin
    #10000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    prog = 1'b0;
    fuse_ctrl = 1'b0;
    check_en(1'b0, "power-up");
    pulse_ctrl();
    check_en(1'b0, "intact after sense");
    pulse_ctrl();
    check_en(1'b0, "intact after second sense");
    prog = 1'b1;
    #5 prog = 1'b0;
    check_en(1'b0, "blown, not yet sensed");
    fuse_ctrl = 1'b1;
    check_en(1'b1, "blown, during sense");
    fuse_ctrl = 1'b0;
    check_en(1'b1, "blown, held by keeper");
    #50;
    check_en(1'b1, "blown, still held");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
