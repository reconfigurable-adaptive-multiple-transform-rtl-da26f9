// tb_clkgen: edge-aligned datapath clock (period 40) and 4x fast clock
// (period 10) for the AMT testbenches; every rising edge of clk coincides with
// a rising edge of clk_fast.
module tb_clkgen (
  output logic clk,
  output logic clk_fast
);
  initial begin
    clk      = 1'b0;
    clk_fast = 1'b0;
    forever begin
      for (int q = 0; q < 4; q++) begin
        #5;
        clk_fast = 1'b1;
        if (q == 0) clk = 1'b1;
        if (q == 2) clk = 1'b0;
        #5;
        clk_fast = 1'b0;
      end
    end
  end
endmodule
