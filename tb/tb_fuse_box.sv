// tb_fuse_box -- self-checking test of one spare's fuse set.
//
// Programs random combinations of USED, BAD and repair address into fresh
// fuse boxes (one instance per case, all sensed together) and checks the
// sensed outputs: used and address as programmed, EN = USED | BAD. An
// unprogrammed box must read all zero.
module tb_fuse_box;
  localparam int AW = 5;
  localparam int NC = 16;

  logic                  fuse_ctrl;
  logic [NC-1:0]         prog, p_used, p_bad;
  logic [NC-1:0][AW-1:0] p_addr, addr;
  logic [NC-1:0]         used, en;
  int checks = 0, failures = 0;

  for (genvar i = 0; i < NC; i++) begin : g_dut
    fuse_box #(.AW(AW)) dut (
      .fuse_ctrl(fuse_ctrl), .prog(prog[i]), .prog_used(p_used[i]), .prog_bad(p_bad[i]),
      .prog_addr(p_addr[i]), .used(used[i]), .addr(addr[i]), .en(en[i]));
  end

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
    for (int i = 0; i < NC; i++) begin
      p_used[i] = i[0];
      p_bad[i]  = i[1];
      p_addr[i] = AW'($urandom);
    end
    p_used[0] = 1'b0;    // case 0 stays unprogrammed
    p_bad[0] = 1'b0;
    #5;
    prog = {{(NC-1){1'b1}}, 1'b0};
    #5;
    prog = '0;
    #5;
    fuse_ctrl = 1'b1;
    #5;
    fuse_ctrl = 1'b0;
    #5;
    for (int i = 0; i < NC; i++) begin
      checks++;
      if (used[i] !== p_used[i] || en[i] !== (p_used[i] | p_bad[i]) ||
          addr[i] !== (i == 0 ? AW'(0) : p_addr[i])) begin
        failures++;
        $display("FAIL case %0d: used=%b en=%b addr=%0d", i, used[i], en[i], addr[i]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
