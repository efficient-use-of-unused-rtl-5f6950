// tb_ecc_spare_mem_small -- end-to-end test of ecc_spare_mem built for a small
// code: 3 data bits, 4 Hsiao check bits (a (7,3) code whose data columns all
// have weight three) and one spare column whose extra row covers data bit 1.
//
// Rows of the data part (columns 0..2): 110, 011, 101, 111, spare row 010.
// Phase 0: the spare is free and holds the extra check bit. Phase 1: the
// spare repairs data column 2, which is made defective here (its cells are
// inverted after every write). In each phase every error pattern of weight
// 1, 2 and 3 over the active codeword bits is injected into the array cells
// of a random word; the flags and data are compared with a column search
// over H done here. Singles must be corrected, doubles flagged; triples are
// miscorrected exactly when their syndrome equals a column. Each mechanism
// (extra check bit, repair, correction, detection, triple unmasked by the
// extra row) is counted and must occur.
module tb_ecc_spare_mem_small;
  localparam int K = 3, R = 4, S = 1, N = K + R, RT = R + S;
  localparam int DEPTH = 16, AD = 4, AW = 3;
  localparam logic [RT-1:0][K-1:0] H = '{3'b010, 3'b111, 3'b101, 3'b110, 3'b011};

  logic                 clk = 1'b0;
  logic                 rst_n, fuse_ctrl;
  logic [S-1:0]         prog, p_used, p_bad, fa;
  logic [S-1:0][AW-1:0] p_addr;
  logic                 we, re, rvalid;
  logic [AD-1:0]        addr;
  logic [K-1:0]         wdata, rdata;
  logic                 err_detected, corrected, uncorrectable;

  logic [K-1:0] model [DEPTH];
  int bad_col = -1, rep_col = -1;
  int checks = 0, failures = 0;
  int n_extra = 0, n_repair = 0, n_single = 0, n_double = 0, n_saved = 0;

  always #5 clk = ~clk;

  ecc_spare_mem #(.K(K), .R(R), .S(S), .H(H), .DEPTH(DEPTH), .AD(AD), .AW(AW)) dut (
    .clk(clk), .rst_n(rst_n), .fuse_ctrl(fuse_ctrl), .prog(prog), .prog_used(p_used),
    .prog_bad(p_bad), .prog_addr(p_addr), .fa(fa), .we(we), .re(re), .addr(addr),
    .wdata(wdata), .rvalid(rvalid), .rdata(rdata), .err_detected(err_detected),
    .corrected(corrected), .uncorrectable(uncorrectable));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  function automatic logic [RT-1:0] col(input int p);
    logic [RT-1:0] c;
    if (p >= K) return RT'(1) << (p - K);
    for (int r = 0; r < RT; r++) c[r] = H[r][p];
    return c;
  endfunction

  task automatic flip_cell(input int a, input int p);
    if (p >= N)            dut.u_mem.mem_s[a][p - N] = ~dut.u_mem.mem_s[a][p - N];
    else if (p == rep_col) dut.u_mem.mem_s[a][0] = ~dut.u_mem.mem_s[a][0];
    else                   dut.u_mem.mem_n[a][p] = ~dut.u_mem.mem_n[a][p];
  endtask

  task automatic write_word(input int a, input logic [K-1:0] d);
    @(negedge clk);
    addr = AD'(a);
    wdata = d;
    we = 1'b1;
    @(negedge clk);
    we = 1'b0;
    model[a] = d;
    if (bad_col >= 0) dut.u_mem.mem_n[a][bad_col] = ~dut.u_mem.mem_n[a][bad_col];
  endtask

  task automatic read_word(input int a);
    @(negedge clk);
    addr = AD'(a);
    re = 1'b1;
    @(posedge clk);
    #1;
    re = 1'b0;
    check(rvalid === 1'b1, "rvalid after one cycle");
  endtask

  task automatic pulse_fuses();
    @(negedge clk);
    fuse_ctrl = 1'b1;
    @(negedge clk);
    fuse_ctrl = 1'b0;
  endtask

  task automatic run_phase(input int ph);
    int nb, w, a;
    logic [RT-1:0] amask, syn, basem;
    logic hit, base_hit;
    nb = fa[0] ? N : N + 1;
    amask = {~fa, {R{1'b1}}};
    basem = {{S{1'b0}}, {R{1'b1}}};
    for (int i = 0; i < DEPTH; i++) write_word(i, K'($urandom));
    for (int i = 0; i < DEPTH; i++) begin
      read_word(i);
      check(rdata === model[i] && !err_detected, $sformatf("phase %0d clean %0d", ph, i));
    end
    if (!fa[0]) n_extra++;
    if (rep_col >= 0) n_repair++;
    for (int e = 1; e < (1 << nb); e++) begin
      w = $countones(e);
      if (w > 3) continue;
      syn = '0;
      for (int p = 0; p < nb; p++) if (e[p]) syn ^= col(p);
      syn &= amask;
      hit = 0;
      base_hit = 0;
      for (int p = 0; p < nb; p++) begin
        if (syn == (col(p) & amask)) hit = 1;
        if (p < N && (syn & basem) == (col(p) & basem)) base_hit = 1;
      end
      a = $urandom_range(DEPTH - 1);
      for (int p = 0; p < nb; p++) if (e[p]) flip_cell(a, p);
      read_word(a);
      if (w == 1) begin
        check(rdata === model[a] && err_detected && corrected && !uncorrectable,
              $sformatf("phase %0d single %b", ph, e));
        n_single++;
      end else if (w == 2) begin
        check(err_detected && !corrected && uncorrectable, $sformatf("phase %0d double %b", ph, e));
        n_double++;
      end else begin
        check(err_detected && corrected === hit && uncorrectable === !hit,
              $sformatf("phase %0d triple %b", ph, e));
        if (base_hit && !hit) n_saved++;
      end
      for (int p = 0; p < nb; p++) if (e[p]) flip_cell(a, p);
    end
  endtask

  initial begin
    #5ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst_n = 1'b0;
    fuse_ctrl = 1'b0;
    prog = '0;
    p_used = '0;
    p_bad = '0;
    p_addr = '0;
    we = 1'b0;
    re = 1'b0;
    addr = '0;
    wdata = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    pulse_fuses();
    check(fa == 1'b0, "spare free after power-up");
    run_phase(0);
    p_used = 1'b1;
    p_addr[0] = AW'(2);
    @(negedge clk);
    prog = 1'b1;
    @(negedge clk);
    prog = 1'b0;
    pulse_fuses();
    check(fa == 1'b1, "spare used after programming");
    rep_col = 2;
    bad_col = 2;
    run_phase(1);
    $display("extra check bit phases %0d, repair phases %0d, singles %0d, doubles %0d, triples unmasked %0d",
             n_extra, n_repair, n_single, n_double, n_saved);
    check(n_extra > 0 && n_repair > 0 && n_single > 0 && n_double > 0 && n_saved > 0,
          "every mechanism exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
