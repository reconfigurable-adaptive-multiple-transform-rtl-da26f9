// amt_mix1_block: reconfigurable 1-input 4-output multiplication block of the
// MCM_MIX1 architecture.
//
// One block per input sample s_J delivers the four products s * DTT_tid[k][J]
// (k = 0..3) together, i.e. one group of four out of the twenty products of
// sample J in all five matrices. It is organised as a single multiplexed
// shift-add block: one shared set of shifted copies of the sample, one merged
// selector (the transform identifier decoded once for all four outputs), and
// four add/subtract chains - the chain hardware that a one-of-twenty block
// would time-share is replicated four times so the four products come out in
// parallel. Each chain term picks its shift and its add/subtract operation
// from the decoded selector; unused terms are gated to zero. The shift/add
// recipe per constant is canonical signed digit. Purely combinational;
// identifiers 5..7 select DCT-II.
module amt_mix1_block
  import amt_pkg::*;
#(
  parameter int unsigned J = 0   // which sample of the column (0..3)
) (
  input  data_t          s,
  input  tr_id_t         tid,
  output prod_t [N-1:0]  p
);

  localparam int MAX_SH = CSD_BITS - 1;

  function automatic int max_weight();
    int w;
    w = 1;
    for (int tr = 0; tr < int'(NUM_TR); tr++)
      for (int k = 0; k < int'(N); k++)
        if (csd_weight(coef(tr, k, int'(J))) > w) w = csd_weight(coef(tr, k, int'(J)));
    return w;
  endfunction

  localparam int T = max_weight();

  // Shared shifted copies of the sample.
  prod_t shifted [MAX_SH+1];
  for (genvar b = 0; b <= MAX_SH; b++) begin : g_shift
    assign shifted[b] = prod_t'(s) <<< b;
  end

  // Merged selector: one decode of the identifier for all four outputs.
  logic [NUM_TR-1:0] sel_oh;
  always_comb begin
    sel_oh = '0;
    unique case (tid)
      TR_DCT5: sel_oh[1] = 1'b1;
      TR_DCT8: sel_oh[2] = 1'b1;
      TR_DST1: sel_oh[3] = 1'b1;
      TR_DST7: sel_oh[4] = 1'b1;
      default: sel_oh[0] = 1'b1;
    endcase
  end

  for (genvar k = 0; k < N; k++) begin : g_out
    prod_t term [T];
    logic  neg  [T];
    for (genvar n = 0; n < T; n++) begin : g_term
      prod_t opt [NUM_TR];
      logic  opt_neg [NUM_TR];
      for (genvar tr = 0; tr < NUM_TR; tr++) begin : g_opt
        localparam int  CV  = coef(tr, int'(k), int'(J));
        localparam bit  EN  = (n < csd_weight(CV));
        localparam int  SH  = csd_shift(CV, n);
        localparam bit  NEG = csd_neg(CV, n);
        if (EN) begin : g_en
          assign opt[tr] = shifted[SH];
        end else begin : g_off
          assign opt[tr] = '0;
        end
        assign opt_neg[tr] = NEG;
      end
      always_comb begin
        term[n] = '0;
        neg[n]  = 1'b0;
        for (int tr = 0; tr < int'(NUM_TR); tr++) begin
          if (sel_oh[tr]) begin
            term[n] = opt[tr];
            neg[n]  = opt_neg[tr];
          end
        end
      end
    end
    always_comb begin
      p[k] = '0;
      for (int n = 0; n < T; n++) begin
        if (neg[n]) p[k] = p[k] - term[n];
        else        p[k] = p[k] + term[n];
      end
    end
  end

endmodule
