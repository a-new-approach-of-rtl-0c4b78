// tb_tx_phase_gen: checks that the transmission clock is low out of reset,
// toggles on every nominal clock edge and so has twice the nominal period.
module tb_tx_phase_gen;
  int checks = 0, failures = 0;
  logic clk = 1'b0, rst_n = 1'b0, tx_clk;
  int   rises = 0;

  tx_phase_gen dut (.clk(clk), .rst_n(rst_n), .tx_clk_o(tx_clk));

  always #5 clk = ~clk;

  initial begin
    #10000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(negedge clk);
    checks++;
    if (tx_clk !== 1'b0) begin failures++; $display("FAIL not low in reset"); end
    rst_n = 1'b1;
    for (int k = 0; k < 40; k++) begin
      @(negedge clk);
      checks++;
      // After edge k (first edge is 0) the clock is high for even k.
      if (tx_clk != ((k % 2) == 0)) begin
        failures++;
        $display("FAIL edge %0d: tx_clk=%b", k, tx_clk);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
