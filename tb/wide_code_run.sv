// wide_code_run -- test driver used by tb_ecc_spare_mem_wide: runs one
// ecc_spare_mem built for a wider data word through the four spare states
// and measures its triple-error miscorrection through the memory itself.
//
// The instance has a small array (DEPTH words). States: three spares free,
// then spare 3, spare 2 and spare 1 marked defective in turn (BAD fuse), so
// that 3, 2, 1 and 0 spare rows are in the code. In each state every word is
// rewritten, then every single error and 200 random double errors are put
// into the array cells and read back; singles must be corrected, doubles
// flagged. Then every triple error over the active codeword bits is
// injected. Each outcome is compared with a column search over H done here
// (miscorrected exactly when the syndrome equals an active column), and the
// number of miscorrected triples is compared with EXP_MIS[f], the count for
// f free spares worked out beforehand with a transform over all triples.
// Ports: done goes high when the run is over; checks and failures are the
// running totals.
module wide_code_run #(
  parameter int K = 32,
  parameter int R = 7,
  parameter int S = 3,
  parameter logic [R+S-1:0][K-1:0] H = '0,
  parameter logic [S:0][31:0] EXP_MIS = '0,
  parameter int DEPTH = 4
) (
  output logic done,
  output int   checks,
  output int   failures
);
  localparam int N = K + R, RT = R + S, AD = $clog2(DEPTH), AW = $clog2(K + R);

  logic                 clk = 1'b0;
  logic                 rst_n, fuse_ctrl;
  logic [S-1:0]         prog, p_used, p_bad, fa;
  logic [S-1:0][AW-1:0] p_addr;
  logic                 we, re, rvalid;
  logic [AD-1:0]        addr;
  logic [K-1:0]         wdata, rdata;
  logic                 err_detected, corrected, uncorrectable;
  logic [K-1:0]         model [DEPTH];

  always #5 clk = ~clk;

  ecc_spare_mem #(.K(K), .R(R), .S(S), .H(H), .DEPTH(DEPTH)) dut (
    .clk(clk), .rst_n(rst_n), .fuse_ctrl(fuse_ctrl), .prog(prog), .prog_used(p_used),
    .prog_bad(p_bad), .prog_addr(p_addr), .fa(fa), .we(we), .re(re), .addr(addr),
    .wdata(wdata), .rvalid(rvalid), .rdata(rdata), .err_detected(err_detected),
    .corrected(corrected), .uncorrectable(uncorrectable));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL K=%0d %s", K, what);
    end
  endtask

  // H column of codeword bit p: data 0..K-1, base check K..N-1, extra N..
  function automatic logic [RT-1:0] col(input int p);
    logic [RT-1:0] c;
    if (p >= K) return RT'(1) << (p - K);
    for (int r = 0; r < RT; r++) c[r] = H[r][p];
    return c;
  endfunction

  task automatic flip_cell(input int a, input int p);
    if (p >= N) dut.u_mem.mem_s[a][p - N] = ~dut.u_mem.mem_s[a][p - N];
    else        dut.u_mem.mem_n[a][p] = ~dut.u_mem.mem_n[a][p];
  endtask

  function automatic logic [K-1:0] rand_word();
    logic [K-1:0] d;
    for (int i = 0; i < K; i += 32) d = (d << 32) | K'($urandom);
    return d;
  endfunction

  task automatic write_word(input int a, input logic [K-1:0] d);
    @(negedge clk);
    addr = AD'(a);
    wdata = d;
    we = 1'b1;
    @(negedge clk);
    we = 1'b0;
    model[a] = d;
  endtask

  task automatic read_word(input int a);
    @(negedge clk);
    addr = AD'(a);
    re = 1'b1;
    @(posedge clk);
    #1;
    re = 1'b0;
    check(rvalid === 1'b1, "rvalid one cycle after re");
  endtask

  task automatic sense_fuses();
    @(negedge clk);
    fuse_ctrl = 1'b1;
    @(negedge clk);
    fuse_ctrl = 1'b0;
  endtask

  task automatic mark_bad(input int s);
    p_used = '0;
    p_bad = '0;
    p_bad[s] = 1'b1;
    @(negedge clk);
    prog[s] = 1'b1;
    @(negedge clk);
    prog[s] = 1'b0;
    sense_fuses();
  endtask

  task automatic run_state(input int nfree);
    int nb, a, mis, mis_ref, tot, permille;
    int pos [2];
    logic [RT-1:0] amask, syn;
    logic hit;
    nb = N + nfree;
    amask = {~fa, {R{1'b1}}};
    for (int i = 0; i < DEPTH; i++) write_word(i, rand_word());
    for (int i = 0; i < DEPTH; i++) begin
      read_word(i);
      check(rdata === model[i] && !err_detected, $sformatf("%0d free: clean read %0d", nfree, i));
    end
    for (int p = 0; p < nb; p++) begin
      a = $urandom_range(DEPTH - 1);
      flip_cell(a, p);
      read_word(a);
      check(rdata === model[a] && err_detected && corrected && !uncorrectable,
            $sformatf("%0d free: single %0d", nfree, p));
      flip_cell(a, p);
    end
    for (int n = 0; n < 200; n++) begin
      do begin
        pos[0] = $urandom_range(nb - 1);
        pos[1] = $urandom_range(nb - 1);
      end while (pos[0] == pos[1]);
      a = $urandom_range(DEPTH - 1);
      flip_cell(a, pos[0]);
      flip_cell(a, pos[1]);
      read_word(a);
      check(err_detected && !corrected && uncorrectable,
            $sformatf("%0d free: double %0d %0d", nfree, pos[0], pos[1]));
      flip_cell(a, pos[0]);
      flip_cell(a, pos[1]);
    end
    mis = 0;
    mis_ref = 0;
    for (int i = 0; i < nb; i++)
      for (int j = i + 1; j < nb; j++)
        for (int k = j + 1; k < nb; k++) begin
          syn = (col(i) ^ col(j) ^ col(k)) & amask;
          hit = 1'b0;
          for (int p = 0; p < nb; p++) if (syn == (col(p) & amask)) hit = 1'b1;
          a = $urandom_range(DEPTH - 1);
          flip_cell(a, i);
          flip_cell(a, j);
          flip_cell(a, k);
          read_word(a);
          check(err_detected && corrected === hit && uncorrectable === !hit,
                $sformatf("%0d free: triple %0d %0d %0d", nfree, i, j, k));
          if (corrected) mis++;
          if (hit) mis_ref++;
          flip_cell(a, i);
          flip_cell(a, j);
          flip_cell(a, k);
        end
    tot = nb * (nb - 1) * (nb - 2) / 6;
    permille = (mis * 1000 + tot / 2) / tot;
    $display("K=%0d, %0d spare(s) free: %0d of %0d triple errors miscorrected (%0d.%0d %%)",
             K, nfree, mis, tot, permille / 10, permille % 10);
    check(mis == mis_ref, $sformatf("%0d free: count matches column search", nfree));
    check(mis == int'(EXP_MIS[nfree]), $sformatf("%0d free: count %0d, expected %0d",
                                                 nfree, mis, EXP_MIS[nfree]));
  endtask

  initial begin
    done = 1'b0;
    checks = 0;
    failures = 0;
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
    sense_fuses();
    check(fa == '0, "all spares free after power-up");
    run_state(S);
    for (int s = S - 1; s >= 0; s--) begin
      mark_bad(s);
      check(fa == ~(S'(1 << s) - S'(1)), $sformatf("spare %0d marked defective", s + 1));
      run_state(s);
    end
    done = 1'b1;
  end
endmodule
