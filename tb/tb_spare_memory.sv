// tb_spare_memory -- self-checking test of the memory array.
//
// Writes random words with random per-column enables into a 64-word instance
// while keeping a reference copy here, then reads every address and checks
// normal and spare columns one cycle after the read, and that the outputs
// hold when re is low.
module tb_spare_memory;
  import secded_pkg::*;
  localparam int DEPTH = 64;
  localparam int AD = 6;

  logic          clk = 1'b0;
  logic [AD-1:0] addr;
  logic          re;
  logic [N-1:0]  we_n, wd_n, rd_n;
  logic [S-1:0]  we_s, wd_s, rd_s;
  logic [N-1:0]  ref_n [DEPTH];
  logic [S-1:0]  ref_s [DEPTH];
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  spare_memory #(.DEPTH(DEPTH), .AD(AD)) dut (
    .clk(clk), .addr(addr), .re(re), .we_n(we_n), .wd_n(wd_n), .we_s(we_s), .wd_s(wd_s),
    .rd_n(rd_n), .rd_s(rd_s));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    re = 1'b0;
    we_n = '0;
    we_s = '0;
    addr = '0;
    @(negedge clk);
    // initialise everything
    for (int a = 0; a < DEPTH; a++) begin
      addr = AD'(a);
      we_n = '1;
      we_s = '1;
      wd_n = N'($urandom);
      wd_s = S'($urandom);
      ref_n[a] = wd_n;
      ref_s[a] = wd_s;
      @(negedge clk);
    end
    // partial writes
    for (int n = 0; n < 300; n++) begin
      addr = AD'($urandom);
      we_n = N'($urandom);
      we_s = S'($urandom);
      wd_n = N'($urandom);
      wd_s = S'($urandom);
      ref_n[addr] = (ref_n[addr] & ~we_n) | (wd_n & we_n);
      ref_s[addr] = (ref_s[addr] & ~we_s) | (wd_s & we_s);
      @(negedge clk);
    end
    we_n = '0;
    we_s = '0;
    for (int a = 0; a < DEPTH; a++) begin
      addr = AD'(a);
      re = 1'b1;
      @(negedge clk);
      re = 1'b0;
      checks++;
      if (rd_n !== ref_n[a] || rd_s !== ref_s[a]) begin
        failures++;
        $display("FAIL addr %0d: %h/%b exp %h/%b", a, rd_n, rd_s, ref_n[a], ref_s[a]);
      end
      addr = AD'(a + 1);
      @(negedge clk);
      checks++;
      if (rd_n !== ref_n[a]) begin
        failures++;
        $display("FAIL hold at addr %0d", a);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
