// tb_correction_logic -- self-checking test of single-error correction, double-
// error detection and triple-error miscorrection with 0..3 active spares.
//
// For each number of free spares (the low ones free, the high ones used for
// repair, as repair takes spares from the highest down) every single, double
// and triple error over the active codeword bits is applied: the syndrome is
// computed here from the H columns, the data word carries the data-bit
// errors. Singles must be corrected to the original data; doubles must be
// flagged uncorrectable with the data untouched; for triples the
// correct/uncorrectable decision must match a column search done here, and
// the number of miscorrected triples must equal the count worked out
// independently for this H-matrix: 1008 of 1540 (65.5 %) with no spare,
// 456 of 1771 (25.7 %) with one, 196 of 2024 (9.7 %) with two and 72 of
// 2300 (3.1 %) with three.
module tb_correction_logic;
  import secded_pkg::*;

  logic [K-1:0]  data_in, data_out;
  logic [RT-1:0] syn_g;
  logic [S-1:0]  en;
  logic          corrected, uncorrectable;
  int checks = 0, failures = 0;

  localparam int EXP_MIS [4] = '{1008, 456, 196, 72};
  localparam int EXP_TOT [4] = '{1540, 1771, 2024, 2300};

  correction_logic dut (.data_in(data_in), .syn_g(syn_g), .spare_en(en),
                        .data_out(data_out), .corrected(corrected),
                        .uncorrectable(uncorrectable));

  // column of codeword bit p: data 0..K-1, then check bits 0..RT-1
  function automatic logic [RT-1:0] col(input int p);
    if (p < K) return h_col(p);
    return RT'(1) << (p - K);
  endfunction

  task automatic fail(input string msg);
    failures++;
    $display("FAIL %s (en=%b syn=%b)", msg, en, syn_g);
  endtask

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [K-1:0]  d, e;
    logic [RT-1:0] amask, s;
    int nb, mis, tot;
    bit hit;
    for (int ns = 0; ns <= S; ns++) begin
      en = '0;
      for (int q = 0; q < S; q++) en[q] = (q >= ns);
      amask = {~en, {R{1'b1}}};
      nb = K + R + ns;          // active codeword bits
      // no error
      d = K'($urandom);
      data_in = d;
      syn_g = '0;
      #1;
      checks++;
      if (data_out !== d || corrected || uncorrectable) fail("clean word");
      // single errors
      for (int a = 0; a < nb; a++) begin
        d = K'($urandom);
        e = (a < K) ? K'(1) << a : '0;
        data_in = d ^ e;
        syn_g = col(a) & amask;
        #1;
        checks++;
        if (data_out !== d || !corrected || uncorrectable) fail($sformatf("single %0d", a));
      end
      // double errors
      for (int a = 0; a < nb; a++)
        for (int b = a + 1; b < nb; b++) begin
          d = K'($urandom);
          e = ((a < K) ? K'(1) << a : '0) ^ ((b < K) ? K'(1) << b : '0);
          data_in = d ^ e;
          syn_g = (col(a) ^ col(b)) & amask;
          #1;
          checks++;
          if (data_out !== data_in || corrected || !uncorrectable) fail($sformatf("double %0d %0d", a, b));
        end
      // triple errors
      mis = 0;
      tot = 0;
      for (int a = 0; a < nb; a++)
        for (int b = a + 1; b < nb; b++)
          for (int c = b + 1; c < nb; c++) begin
            s = (col(a) ^ col(b) ^ col(c)) & amask;
            hit = 0;
            for (int p = 0; p < nb; p++) if (s == (col(p) & amask)) hit = 1;
            data_in = K'($urandom);
            syn_g = s;
            #1;
            tot++;
            if (corrected) mis++;
            checks++;
            if (corrected !== hit || uncorrectable !== !hit) fail($sformatf("triple %0d %0d %0d", a, b, c));
          end
      $display("%0d free spare(s): %0d of %0d triple errors miscorrected (%0d.%0d %%)",
               ns, mis, tot, (mis * 100) / tot, ((mis * 1000) / tot) % 10);
      checks++;
      if (mis != EXP_MIS[ns] || tot != EXP_TOT[ns]) fail("triple-error miscorrection count");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
