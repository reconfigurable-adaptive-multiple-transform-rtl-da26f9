// tb_amt_mix2_block: checks the overclocked MCM_MIX2 block. A new sample and
// transform identifier are applied at every datapath clock edge; the test
// drives column_idx with the quarter count (0 in the quarter after a clk
// edge). At the next clk edge all four registered products must equal the
// sample times the column-3 coefficients of the chosen transform (checked
// just after that edge, before the first quarter of the new period ends), i.e.
// the four products of one sample are ready within one datapath period.
module tb_amt_mix2_block;
  import amt_pkg::*;
  import tb_amt_ref_pkg::*;

  int checks = 0, failures = 0;
  logic clk, clk_fast, rst_n;
  data_t  s;
  tr_id_t tid;
  logic [1:0] column_idx;
  prod_t [3:0] p;

  tb_clkgen u_clk (.clk(clk), .clk_fast(clk_fast));

  amt_mix2_block #(.J(3)) dut (
    .clk_fast(clk_fast), .rst_n(rst_n), .s(s), .tid(tid),
    .column_idx(column_idx), .p(p));

  // quarter counter: the first clk_fast edge coincides with the first clk
  // edge, so starting at 3 gives 0 in every quarter that follows a clk edge
  initial column_idx = 2'd3;
  always @(posedge clk_fast) column_idx <= column_idx + 2'd1;

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int exp_s, exp_t;
  bit have;

  initial begin
    rst_n = 1'b0;
    s = '0;
    tid = TR_DCT2;
    have = 1'b0;
    repeat (2) @(posedge clk);
    rst_n <= 1'b1;
    for (int it = 0; it < 300; it++) begin
      @(posedge clk);
      #1;  // register 3 is loaded by the clk_fast edge that coincides with clk
      if (have) begin
        for (int k = 0; k < 4; k++) begin
          checks++;
          if (longint'(p[k]) != longint'(exp_s) * ref_coef(exp_t, k, 3)) begin
            failures++;
            $display("FAIL s=%0d tid=%0d k=%0d got %0d exp %0d", exp_s, exp_t, k,
                     longint'(p[k]), longint'(exp_s) * ref_coef(exp_t, k, 3));
          end
        end
      end
      exp_s = (it == 0) ? -512 : (it == 1) ? 511 : rand_sample();
      exp_t = int'($urandom_range(7));
      s   = data_t'(exp_s);
      tid = tr_id_t'(exp_t);
      have = 1'b1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
