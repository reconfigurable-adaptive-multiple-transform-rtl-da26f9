// tb_amt_1d: drives all five multiplier organisations of the 1-D transform,
// and a single-transform (DCT-VIII) instance,
// with the same random column stream (random transform identifiers 0..7,
// random idle cycles, extreme samples) and checks, one clk cycle after each
// input, that out_valid follows in_valid with a latency of exactly one cycle
// and that out_tid / out_vec equal t[k] = sum_j DTT[k][j] * s[j] computed with
// recomputed coefficients. The MCM_MIX2 instance runs on the 4x clock.
module tb_amt_1d;
  import amt_pkg::*;
  import tb_amt_ref_pkg::*;

  localparam int NA = 5;

  int checks = 0, failures = 0;
  logic clk, clk_fast, rst_n;
  logic          in_valid;
  tr_id_t        in_tid;
  data_t [3:0]   in_vec;
  logic  [NA-1:0]     out_valid;
  tr_id_t [NA-1:0]    out_tid;
  sum_t  [NA-1:0][3:0] out_vec;

  tb_clkgen u_clk (.clk(clk), .clk_fast(clk_fast));

  // single-transform circuit fixed to DCT-VIII
  logic        sa_valid;
  tr_id_t      sa_tid;
  sum_t [3:0]  sa_vec;
  amt_1d #(.ARCH(ARCH_STANDALONE), .FIXED_TR(TR_DCT8)) dut_sa (
    .clk(clk), .clk_fast(clk_fast), .rst_n(rst_n),
    .in_valid(in_valid), .in_tid(in_tid), .in_vec(in_vec),
    .out_valid(sa_valid), .out_tid(sa_tid), .out_vec(sa_vec));

  for (genvar a = 0; a < NA; a++) begin : g_dut
    amt_1d #(.ARCH(arch_t'(a))) dut (
      .clk(clk), .clk_fast(clk_fast), .rst_n(rst_n),
      .in_valid(in_valid), .in_tid(in_tid), .in_vec(in_vec),
      .out_valid(out_valid[a]), .out_tid(out_tid[a]), .out_vec(out_vec[a]));
  end

  initial begin
    #400000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // what was applied in the previous cycle
  bit  pv, cv;
  int  ct;
  int  cs [4];
  int  pt;
  int  ps [4];
  int  n_valid = 0, n_idle = 0;

  initial begin
    rst_n    = 1'b0;
    in_valid = 1'b0;
    in_tid   = TR_DCT2;
    in_vec   = '0;
    pv       = 1'b0;
    repeat (2) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
    for (int it = 0; it < 1500; it++) begin
      @(posedge clk);
      cv = pv;
      ct = pt;
      cs = ps;
      // next input
      pv = ($urandom_range(9) < 8);
      pt = int'($urandom_range(7));
      for (int j = 0; j < 4; j++)
        ps[j] = (it < 8) ? ((((it >> j) & 1) != 0) ? 511 : -512) : rand_sample();
      if (pv) n_valid++; else n_idle++;
      in_valid <= pv;
      in_tid   <= tr_id_t'(pt);
      for (int j = 0; j < 4; j++) in_vec[j] <= data_t'(ps[j]);
      // check, a little after the edge, the response to the input applied at
      // the previous edge (the MCM_MIX2 output register is loaded a quarter
      // period after the edge)
      #15;
      checks++;
      if (sa_valid != cv || (cv && int'(sa_tid) != ct)) begin
        failures++;
        $display("FAIL standalone valid/tid");
      end
      if (cv) begin
        for (int k = 0; k < 4; k++) begin
          checks++;
          if (longint'(sa_vec[k]) != ref_t(2, k, cs[0], cs[1], cs[2], cs[3])) begin
            failures++;
            $display("FAIL standalone k %0d got %0d", k, longint'(sa_vec[k]));
          end
        end
      end
      for (int a = 0; a < NA; a++) begin
        checks++;
        if (out_valid[a] != cv) begin
          failures++;
          $display("FAIL arch %0d valid %0b exp %0b at it %0d", a, out_valid[a], cv, it);
        end
        if (cv) begin
          checks++;
          if (int'(out_tid[a]) != ct) begin
            failures++;
            $display("FAIL arch %0d tid %0d exp %0d", a, out_tid[a], ct);
          end
          for (int k = 0; k < 4; k++) begin
            longint e;
            e = ref_t(ct, k, cs[0], cs[1], cs[2], cs[3]);
            checks++;
            if (longint'(out_vec[a][k]) != e) begin
              failures++;
              $display("FAIL arch %0d tid %0d k %0d got %0d exp %0d", a, ct, k,
                       longint'(out_vec[a][k]), e);
            end
          end
        end
      end
    end
    checks++;
    if (n_valid == 0 || n_idle == 0) begin
      failures++;
      $display("FAIL stimulus lacked valid or idle cycles");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
