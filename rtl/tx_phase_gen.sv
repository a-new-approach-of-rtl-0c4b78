// tx_phase_gen: transmission clock at half the nominal clock rate.
//
// The link runs on one nominal clock clk. The transmission clock has twice its
// period: tx_clk_o is a register that toggles on every rising edge of clk and
// is low after reset. A "rising edge of the transmission clock" is therefore
// the clk edge at which tx_clk_o goes from 0 to 1, a "falling edge" the one at
// which it goes from 1 to 0; logic that acts on one of them samples tx_clk_o
// and acts on the clk edge when it is 0 (rising) or 1 (falling). The 2:1 ratio
// between the two clocks follows the reference design; generating the slower
// clock as a divided, registered signal in the nominal clock domain is this
// design's own choice.
module tx_phase_gen (
  input  logic clk,
  input  logic rst_n,
  output logic tx_clk_o
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) tx_clk_o <= 1'b0;
    else        tx_clk_o <= ~tx_clk_o;
  end

endmodule
