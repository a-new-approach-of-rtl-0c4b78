// tb_skew_sender: a rising-edge bank loads only on rising transmission-clock
// edges, a falling-edge bank only on falling ones, and both hold otherwise.
module tb_skew_sender;
  import skew_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 1'b0, rst_n = 1'b0, txc;
  logic [WORD_W-1:0] d, qr, qf, er, ef;

  skew_sender #(.EDGE(EDGE_RISE)) dut_r (.clk(clk), .rst_n(rst_n), .tx_clk_i(txc), .d_i(d), .q_o(qr));
  skew_sender #(.EDGE(EDGE_FALL)) dut_f (.clk(clk), .rst_n(rst_n), .tx_clk_i(txc), .d_i(d), .q_o(qf));

  always #5 clk = ~clk;

  initial begin
    #100000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    txc = 1'b0;
    d   = '0;
    er  = '0;
    ef  = '0;
    repeat (2) @(negedge clk);
    checks++;
    if (qr != '0 || qf != '0) begin failures++; $display("FAIL reset"); end
    rst_n = 1'b1;
    for (int k = 0; k < 400; k++) begin
      d = {$urandom, $urandom};
      @(posedge clk);
      @(negedge clk);
      // The edge just passed was a rising edge of the transmission clock
      // when the clock was low before it.
      if (!txc) er = d;
      else      ef = d;
      checks += 2;
      if (qr != er) begin failures++; $display("FAIL rise bank %h exp %h", qr, er); end
      if (qf != ef) begin failures++; $display("FAIL fall bank %h exp %h", qf, ef); end
      txc = ~txc;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
