// tb_ecc_spare_mem -- end-to-end test of the spare-column SEC-DED memory at its
// default size (16 data bits, 6 + 3 check bits, 1024 words).
//
// The test walks the fuse configuration through the life of a part:
//   phase 0  no fuse blown: all three spares hold extra check bits;
//   phase 1  spare 3 repairs data column 7, which is made defective here
//            (its cells are inverted after every write);
//   phase 2  spare 2 is marked defective;
//   phase 3  spare 1 repairs check column 18; only the base code is left.
// In each phase every word is written with random data and read back clean,
// then single, double and triple errors are injected straight into the
// array cells (the cell a codeword bit really lives in: normal column, or the
// spare that repairs it, or the spare holding an extra check bit). Expected
// results come from a column search over the H-matrix done here: singles are
// corrected, doubles flagged, triples flagged unless their syndrome equals an
// active column. Every read is checked to complete with rvalid exactly one
// clock after re.
// Mechanisms counted, each must occur: extra check bit in use, column repair
// through a spare, defective spare, single-error correction, double-error
// detection, triple error miscorrected, and triple error that the base code
// would miscorrect but the extra rows detect.
module tb_ecc_spare_mem;
  import secded_pkg::*;

  localparam int DEPTH = 1024;
  localparam int AD = 10;
  localparam int AW = $clog2(N);

  logic                 clk = 1'b0;
  logic                 rst_n;
  logic                 fuse_ctrl;
  logic [S-1:0]         prog, p_used, p_bad, fa;
  logic [S-1:0][AW-1:0] p_addr;
  logic                 we, re, rvalid;
  logic [AD-1:0]        addr;
  logic [K-1:0]         wdata, rdata;
  logic                 err_detected, corrected, uncorrectable;

  logic [K-1:0] model [DEPTH];
  int bad_col;                  // normal column made defective, -1 none
  int rep_col [S] = '{-1, -1, -1};   // column each spare repairs, -1 none
  int checks = 0, failures = 0;
  int n_extra_chk = 0, n_repair = 0, n_bad_spare = 0, n_single = 0, n_double = 0;
  int n_triple_mis = 0, n_triple_saved = 0;

  always #5 clk = ~clk;

  ecc_spare_mem dut (
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

  // H column of codeword bit p: data 0..K-1, base check K..N-1, extra N..N+S-1
  function automatic logic [RT-1:0] col(input int p);
    if (p < K) return h_col(p);
    return RT'(1) << (p - K);
  endfunction

  function automatic logic [RT-1:0] amask();
    return {~fa, {R{1'b1}}};
  endfunction

  // spare that repairs normal column p, or -1
  function automatic int repairer(input int p);
    for (int s = 0; s < S; s++) if (rep_col[s] == p) return s;
    return -1;
  endfunction

  // invert the array cell holding codeword bit p of word a
  task automatic flip_cell(input int a, input int p);
    int s;
    if (p >= N) begin
      dut.u_mem.mem_s[a][p - N] = ~dut.u_mem.mem_s[a][p - N];
    end else begin
      s = repairer(p);
      if (s >= 0) dut.u_mem.mem_s[a][s] = ~dut.u_mem.mem_s[a][s];
      else        dut.u_mem.mem_n[a][p] = ~dut.u_mem.mem_n[a][p];
    end
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

  // read a word; returns outputs seen one clock after re
  task automatic read_word(input int a, output logic [K-1:0] d, output logic e,
                           output logic c, output logic u);
    @(negedge clk);
    addr = AD'(a);
    re = 1'b1;
    @(posedge clk);
    #1;
    re = 1'b0;
    check(rvalid === 1'b1, "rvalid one cycle after re");
    d = rdata;
    e = err_detected;
    c = corrected;
    u = uncorrectable;
    @(posedge clk);
    #1;
    check(rvalid === 1'b0, "rvalid drops");
  endtask

  task automatic sense_fuses();
    @(negedge clk);
    fuse_ctrl = 1'b1;
    @(negedge clk);
    fuse_ctrl = 1'b0;
  endtask

  task automatic blow(input int s, input bit used, input bit bad, input int col_addr);
    p_used = '0;
    p_bad = '0;
    p_addr = '0;
    p_used[s] = used;
    p_bad[s] = bad;
    p_addr[s] = AW'(col_addr);
    if (used) rep_col[s] = col_addr;
    @(negedge clk);
    prog[s] = 1'b1;
    @(negedge clk);
    prog[s] = 1'b0;
    sense_fuses();
  endtask

  task automatic run_phase(input int ph);
    logic [K-1:0] d;
    logic e, c, u, hit, base_hit;
    int nb, pos [3];
    logic [RT-1:0] syn, basem;
    nb = K + R + S;
    for (int a = 0; a < DEPTH; a++) write_word(a, K'($urandom));
    // clean reads of every word
    for (int a = 0; a < DEPTH; a++) begin
      read_word(a, d, e, c, u);
      check(d === model[a] && !e && !c && !u, $sformatf("phase %0d clean read %0d", ph, a));
    end
    if (fa != '1) n_extra_chk++;
    if (bad_col >= 0) n_repair++;
    // single errors on every active codeword bit
    for (int p = 0; p < nb; p++) begin
      int a;
      if (p >= N && fa[p - N]) continue;
      a = $urandom_range(DEPTH - 1);
      flip_cell(a, p);
      read_word(a, d, e, c, u);
      check(d === model[a] && e && c && !u, $sformatf("phase %0d single bit %0d", ph, p));
      n_single++;
      flip_cell(a, p);
    end
    // double errors
    for (int n = 0; n < 60; n++) begin
      int a;
      do begin
        pos[0] = $urandom_range(nb - 1);
        pos[1] = $urandom_range(nb - 1);
      end while (pos[0] == pos[1] || (pos[0] >= N && fa[pos[0] - N]) ||
                 (pos[1] >= N && fa[pos[1] - N]));
      a = $urandom_range(DEPTH - 1);
      flip_cell(a, pos[0]);
      flip_cell(a, pos[1]);
      read_word(a, d, e, c, u);
      check(e && !c && u, $sformatf("phase %0d double %0d %0d", ph, pos[0], pos[1]));
      n_double++;
      flip_cell(a, pos[0]);
      flip_cell(a, pos[1]);
    end
    // triple errors
    basem = {{S{1'b0}}, {R{1'b1}}};
    for (int n = 0; n < 300; n++) begin
      int a;
      do begin
        for (int i = 0; i < 3; i++) pos[i] = $urandom_range(nb - 1);
      end while (pos[0] == pos[1] || pos[0] == pos[2] || pos[1] == pos[2] ||
                 (pos[0] >= N && fa[pos[0] - N]) || (pos[1] >= N && fa[pos[1] - N]) ||
                 (pos[2] >= N && fa[pos[2] - N]));
      syn = (col(pos[0]) ^ col(pos[1]) ^ col(pos[2])) & amask();
      hit = 0;
      base_hit = 0;
      for (int p = 0; p < nb; p++) begin
        if (p >= N && fa[p - N]) continue;
        if (syn == (col(p) & amask())) hit = 1;
        if (p < N && (syn & basem) == (col(p) & basem)) base_hit = 1;
      end
      a = $urandom_range(DEPTH - 1);
      for (int i = 0; i < 3; i++) flip_cell(a, pos[i]);
      read_word(a, d, e, c, u);
      check(e && c === hit && u === !hit, $sformatf("phase %0d triple", ph));
      if (hit) n_triple_mis++;
      if (base_hit && !hit) n_triple_saved++;
      for (int i = 0; i < 3; i++) flip_cell(a, pos[i]);
    end
  endtask

  initial begin
    #50ms;
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
    bad_col = -1;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    sense_fuses();
    check(fa == 3'b000, "phase 0 FA");
    run_phase(0);

    blow(2, 1'b1, 1'b0, 7);
    check(fa == 3'b100, "phase 1 FA");
    bad_col = 7;
    run_phase(1);

    blow(1, 1'b0, 1'b1, 0);
    check(fa == 3'b110, "phase 2 FA");
    n_bad_spare++;
    run_phase(2);

    blow(0, 1'b1, 1'b0, 18);
    check(fa == 3'b111, "phase 3 FA");
    run_phase(3);

    $display("extra check bits in use: %0d phases, column repair: %0d phases, defective spare: %0d",
             n_extra_chk, n_repair, n_bad_spare);
    $display("singles corrected %0d, doubles detected %0d, triples miscorrected %0d, triples saved by extra rows %0d",
             n_single, n_double, n_triple_mis, n_triple_saved);
    check(n_extra_chk > 0, "extra check bits exercised");
    check(n_repair > 0, "column repair exercised");
    check(n_bad_spare > 0, "defective spare exercised");
    check(n_single > 0, "single-error correction exercised");
    check(n_double > 0, "double-error detection exercised");
    check(n_triple_mis > 0, "triple-error miscorrection exercised");
    check(n_triple_saved > 0, "triple errors unmasked by extra rows");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
