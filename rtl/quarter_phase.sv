// quarter_phase: quarter-period counter for the overclocked MCM_MIX2 blocks.
//
// clk_fast runs at four times the datapath clock clk, with every fourth
// rising edge of clk_fast coinciding with a rising edge of clk. column_idx
// tells which quarter of the current clk period is in progress (0..3; 0 is
// the quarter right after a clk edge). A toggle flop on clk is compared with
// its copy taken on clk_fast: they differ exactly during quarter 0, which
// re-aligns the free-running 2-bit counter every period, so no reset
// alignment between the two clocks is needed.
module quarter_phase (
  input  logic       clk,
  input  logic       clk_fast,
  input  logic       rst_n,
  output logic [1:0] column_idx
);

  logic tog, tog_q;
  logic [1:0] cnt;
  logic first_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) tog <= 1'b0;
    else        tog <= ~tog;
  end

  assign first_q = (tog != tog_q);

  always_ff @(posedge clk_fast or negedge rst_n) begin
    if (!rst_n) begin
      tog_q <= 1'b0;
      cnt   <= '0;
    end else begin
      tog_q <= tog;
      cnt   <= first_q ? 2'd1 : cnt + 2'd1;
    end
  end

  assign column_idx = first_q ? 2'd0 : cnt;

endmodule
