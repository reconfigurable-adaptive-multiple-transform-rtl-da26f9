// tb_mcm_mux_core: checks the MCM-multiplexed block with five constants (the
// (0,0) position: 256, 194, 336, 190, 117) and with twenty constants (one
// column of all five matrices, including a zero), for every selector value
// and extreme and random samples, against products with recomputed
// coefficients. Selector values past the table must read entry 0.
module tb_mcm_mux_core;
  import amt_pkg::*;
  import tb_amt_ref_pkg::*;

  int checks = 0, failures = 0;
  data_t s;
  logic [2:0] sel5;
  logic [4:0] sel20;
  prod_t p5, p20;

  mcm_mux_core #(.NSEL(5), .SEL_W(3), .COEF(pos_coefs(0, 0))) u5 (.s(s), .sel(sel5), .p(p5));
  mcm_mux_core #(.NSEL(20), .SEL_W(5), .COEF(all_coefs(2)))   u20 (.s(s), .sel(sel20), .p(p20));

  task automatic check(string what, longint got, longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s s=%0d sel5=%0d sel20=%0d got %0d exp %0d", what, s, sel5, sel20, got, exp);
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
    for (int it = 0; it < 200; it++) begin
      case (it)
        0: s = -512;
        1: s = 511;
        2: s = 3;
        default: s = data_t'(rand_sample());
      endcase
      for (int m = 0; m < 8; m++) begin
        sel5 = 3'(m);
        #1;
        check("nsel5", longint'(p5), longint'(s) * ref_coef((m < 5) ? m : 0, 0, 0));
      end
      for (int m = 0; m < 32; m++) begin
        sel20 = 5'(m);
        #1;
        check("nsel20", longint'(p20),
              longint'(s) * ((m < 20) ? ref_coef(m / 4, m % 4, 2) : ref_coef(0, 0, 2)));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
