// tb_error_detect -- self-checking test of the spare syndrome gating.
//
// Exhaustive over all syndrome values and spare EN patterns: the extra
// syndrome bit of a spare with EN = 1 must be cleared, the base bits must
// pass, and the error flag must be the OR of what remains.
module tb_error_detect;
  import secded_pkg::*;

  logic [RT-1:0] syn, syn_g;
  logic [S-1:0]  en;
  logic          err;
  int checks = 0, failures = 0;

  error_detect dut (.syn(syn), .spare_en(en), .syn_g(syn_g), .err(err));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [RT-1:0] exp;
    for (int e = 0; e < (1 << S); e++) begin
      for (int v = 0; v < (1 << RT); v++) begin
        syn = RT'(v);
        en = S'(e);
        #1;
        exp = syn & ~{en, {R{1'b0}}};
        checks++;
        if (syn_g !== exp || err !== (exp != '0)) begin
          failures++;
          $display("FAIL syn=%b en=%b syn_g=%b err=%b", syn, en, syn_g, err);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
