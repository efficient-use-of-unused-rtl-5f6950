// xor_share_net -- XOR network for a set of parity equations, with shared terms.
//
// Computes dout = M . din over GF(2): output o is the XOR of the inputs
// selected by row o of the matrix M. Instead of one XOR tree per row, the
// network is built from shared sub-terms found by similarity of the rows:
//
//   level 0      the rows of M (the equation matrix);
//   level L+1    the bitwise AND of every pair of level-L rows (the part two
//                equations have in common), with duplicates and rows holding
//                fewer than two ones removed;
//   stop         when a level holds no more than one row.
//
// Every similarity row of every level is a candidate shared term. The
// candidates are sorted by ascending weight; each is realised as the XOR of
// the largest smaller candidates it contains (greedily, disjoint) plus the
// inputs left over, and each output is realised the same way from the
// largest candidates it contains. Only candidates some output needs are
// kept. All of this is worked out at elaboration by build_net(); the logic is
// the resulting XOR network, purely combinational, no clock.
//
// The similarity/sort/delete/replace loop follows the published logic
// sharing method. This design's own choices: the greedy largest-first cover
// used for the replacement step, and the caps LVL_CAP (rows kept per level)
// and MAX_LVL (levels), which bound elaboration work; a cap only reduces how
// much is shared, never the result. NET.gates is the number of two-input XOR
// gates of the network: for the default 16-bit matrix it is 36 with no spare
// row, 40 with one, 45 with two and 49 with three spare rows.
module xor_share_net #(
  parameter int NI      = secded_pkg::K,
  parameter int NO      = secded_pkg::RT,
  parameter logic [NO-1:0][NI-1:0] M = secded_pkg::H_DATA,
  parameter int MAXT    = 48,   // capacity of the shared-term list (>= NO)
  parameter int LVL_CAP = 24,   // similarity rows kept per level (<= MAXT)
  parameter int MAX_LVL = 4     // similarity levels examined
) (
  input  logic [NI-1:0] din,
  output logic [NO-1:0] dout
);

  typedef struct packed {
    logic [MAXT-1:0][MAXT-1:0] tt;   // term i uses earlier term j
    logic [MAXT-1:0][NI-1:0]   ti;   // term i uses input k
    logic [NO-1:0][MAXT-1:0]   ot;   // output o uses term j
    logic [NO-1:0][NI-1:0]     oi;   // output o uses input k
    logic [MAXT-1:0]           used;
    int unsigned               gates;
  } net_t;

  function automatic net_t build_net();
    net_t n;
    logic [MAXT-1:0][NI-1:0] c;      // candidate terms, input masks
    logic [MAXT-1:0][NI-1:0] lvl;
    logic [MAXT-1:0][NI-1:0] nxt;
    logic [NI-1:0] v;
    logic [NI-1:0] rem;
    int nc, nl, nn;
    bit dup;
    n = '0;
    c = '0;
    lvl = '0;
    nc = 0;
    nl = NO;
    for (int o = 0; o < NO; o++) lvl[o] = M[o];
    // Steps 2-5: similarity levels.
    for (int l = 0; l < MAX_LVL; l++) begin
      if (nl > 1) begin
        nxt = '0;
        nn = 0;
        for (int s = 0; s < nl - 1; s++) begin
          for (int k = s + 1; k < nl; k++) begin
            v = lvl[s] & lvl[k];
            if ($countones(v) >= 2 && nn < LVL_CAP) begin
              dup = 1'b0;
              for (int q = 0; q < nn; q++) if (nxt[q] == v) dup = 1'b1;
              if (!dup) begin
                nxt[nn] = v;
                nn++;
              end
            end
          end
        end
        for (int q = 0; q < nn; q++) begin
          dup = 1'b0;
          for (int p = 0; p < nc; p++) if (c[p] == nxt[q]) dup = 1'b1;
          if (!dup && nc < MAXT) begin
            c[nc] = nxt[q];
            nc++;
          end
        end
        lvl = nxt;
        nl = nn;
      end
    end
    // Step 4-1: ascending weight.
    for (int a = 0; a < nc; a++) begin
      for (int b = 0; b < nc - 1 - a; b++) begin
        if ($countones(c[b]) > $countones(c[b+1])) begin
          v = c[b];
          c[b] = c[b+1];
          c[b+1] = v;
        end
      end
    end
    // Step 5: express terms and outputs by the largest contained terms.
    for (int i = 0; i < nc; i++) begin
      rem = c[i];
      for (int j = i - 1; j >= 0; j--) begin
        if (c[j] != '0 && (c[j] & ~rem) == '0) begin
          n.tt[i][j] = 1'b1;
          rem = rem & ~c[j];
        end
      end
      n.ti[i] = rem;
    end
    for (int o = 0; o < NO; o++) begin
      rem = M[o];
      for (int j = nc - 1; j >= 0; j--) begin
        if (c[j] != '0 && (c[j] & ~rem) == '0) begin
          n.ot[o][j] = 1'b1;
          rem = rem & ~c[j];
        end
      end
      n.oi[o] = rem;
      n.used = n.used | n.ot[o];
    end
    for (int i = nc - 1; i >= 0; i--) if (n.used[i]) n.used = n.used | n.tt[i];
    // Step 6: drop unused terms and count two-input XOR gates.
    n.gates = 0;
    for (int i = 0; i < MAXT; i++) begin
      if (!n.used[i]) begin
        n.tt[i] = '0;
        n.ti[i] = '0;
      end else begin
        n.gates += $countones(n.tt[i]) + $countones(n.ti[i]) - 1;
      end
    end
    for (int o = 0; o < NO; o++)
      if ($countones(n.ot[o]) + $countones(n.oi[o]) > 0)
        n.gates += $countones(n.ot[o]) + $countones(n.oi[o]) - 1;
    return n;
  endfunction

  localparam net_t NET = build_net();

  always_comb begin
    logic [MAXT-1:0] t;
    t = '0;
    for (int i = 0; i < MAXT; i++)
      t[i] = (^(din & NET.ti[i])) ^ (^(t & NET.tt[i]));
    for (int o = 0; o < NO; o++)
      dout[o] = (^(din & NET.oi[o])) ^ (^(t & NET.ot[o]));
  end

endmodule
