// tb_amt_mix0_block: checks MCM_MIX0 1-output blocks at matrix positions (0,0), (1,3) and (3,2) for all eight transform identifier codes (5..7 must act as DCT-II), against products with recomputed coefficients.
module tb_amt_mix0_block;
  import amt_pkg::*;
  import tb_amt_ref_pkg::*;

  int checks = 0, failures = 0;
  data_t  s;
  tr_id_t tid;
  prod_t p00, p13, p32;
  amt_mix0_block #(.K(0), .J(0)) u00 (.s(s), .tid(tid), .p(p00));
  amt_mix0_block #(.K(1), .J(3)) u13 (.s(s), .tid(tid), .p(p13));
  amt_mix0_block #(.K(3), .J(2)) u32 (.s(s), .tid(tid), .p(p32));

  task automatic check(string what, longint got, longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s s=%0d tid=%0d got %0d exp %0d", what, s, tid, got, exp);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int it = 0; it < 300; it++) begin
      case (it)
        0: s = -512;
        1: s = 511;
        2: s = 0;
        default: s = data_t'(rand_sample());
      endcase
      for (int t = 0; t < 8; t++) begin
        tid = tr_id_t'(t);
        #1;
        check("(0,0)", longint'(p00), longint'(s) * ref_coef(t, 0, 0));
        check("(1,3)", longint'(p13), longint'(s) * ref_coef(t, 1, 3));
        check("(3,2)", longint'(p32), longint'(s) * ref_coef(t, 3, 2));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
