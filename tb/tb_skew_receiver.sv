// tb_skew_receiver: every wire keeps its last two samples; samp_o is the
// older one and err_o flags wires whose two samples differ.
module tb_skew_receiver;
  int checks = 0, failures = 0;
  logic clk = 1'b0, rst_n = 1'b0;
  logic [65:0] line, samp, err;
  logic [65:0] h1, h2;   // value at the last and the one before last edge

  skew_receiver #(.W(66)) dut (.clk(clk), .rst_n(rst_n), .line_i(line),
                               .samp_o(samp), .err_o(err));

  always #5 clk = ~clk;

  initial begin
    #100000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    line = '0;
    h1 = '0;
    h2 = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int k = 0; k < 500; k++) begin
      // Hold a value for two cycles most of the time, as a skewed bus does.
      if (k % 2 == 0 || $urandom_range(3) == 0) line = {$urandom, $urandom, 2'($urandom)};
      @(posedge clk);
      h2 = h1;
      h1 = line;
      @(negedge clk);
      checks += 2;
      if (samp != h2) begin failures++; $display("FAIL samp %h exp %h", samp, h2); end
      if (err != (h1 ^ h2)) begin failures++; $display("FAIL err %h", err); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
