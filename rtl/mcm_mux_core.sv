// mcm_mux_core: MCM-multiplexed block, one sample in, one product out, the
// constant chosen by a selector from a set of NSEL constants.
//
// p = s * COEF[sel]. The block is one shared shift-add chain of T adders/
// subtractors, T being the largest number of non-zero canonical signed digits
// among the constants. Term n of the chain takes the sample shifted to the
// n-th digit position of the selected constant, so the chain's shifters become
// small multiplexers of constant shifts, its adders become add/subtract units
// whose operation is also selected, and a constant with fewer digits gates the
// spare terms to zero. This realises "one of M products at a time from shared
// adders and shifters" with multiplexers on the shift and +/- points. The
// recipe (CSD, digits ordered from the LSB) is this design's own stand-in for
// an optimising MCM-multiplexed generator.
//
// With NSEL = 5 and one coefficient position of the five AMT matrices it is
// the 1-output block of MCM_MUX; with NSEL = 20 and one matrix column of all
// five matrices it is the 1-of-20 block of MCM_MIX2. A selector value
// >= NSEL reads entry 0. Purely combinational.
module mcm_mux_core
  import amt_pkg::*;
#(
  parameter int unsigned       NSEL  = 5,
  parameter int unsigned       SEL_W = (NSEL > 1) ? $clog2(NSEL) : 1,
  parameter coef_t [NSEL-1:0]  COEF  = pos_coefs(0, 0)
) (
  input  data_t             s,
  input  logic [SEL_W-1:0]  sel,
  output prod_t             p
);

  function automatic int max_weight();
    int w;
    w = 1;
    for (int m = 0; m < int'(NSEL); m++)
      if (csd_weight(int'(COEF[m])) > w) w = csd_weight(int'(COEF[m]));
    return w;
  endfunction

  localparam int T = max_weight();

  prod_t s_ext;
  assign s_ext = prod_t'(s);

  // cand[n][m]: term n of the chain when constant m is selected.
  prod_t cand [T][NSEL];
  logic  cneg [T][NSEL];

  for (genvar n = 0; n < T; n++) begin : g_term
    for (genvar m = 0; m < NSEL; m++) begin : g_sel
      localparam int  CM  = int'(COEF[m]);
      localparam bit  EN  = (n < csd_weight(CM));
      localparam int  SH  = csd_shift(CM, n);
      localparam bit  NEG = csd_neg(CM, n);
      if (EN) begin : g_en
        assign cand[n][m] = s_ext <<< SH;
      end else begin : g_off
        assign cand[n][m] = '0;
      end
      assign cneg[n][m] = NEG;
    end
  end

  logic [SEL_W-1:0] sel_eff;
  assign sel_eff = (32'(sel) < NSEL) ? sel : '0;

  always_comb begin
    p = '0;
    for (int n = 0; n < T; n++) begin
      if (cneg[n][sel_eff]) p = p - cand[n][sel_eff];
      else                  p = p + cand[n][sel_eff];
    end
  end

endmodule
