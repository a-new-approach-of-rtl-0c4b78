// tb_parity_check: correct coded words pass, words with an odd number of
// flipped bits are flagged, words with an even number of flips pass (the
// limit of a single parity bit).
module tb_parity_check;
  int checks = 0, failures = 0;
  logic [32:0] w;
  logic [31:0] d;
  logic        perr;

  parity_check #(.DW(32)) dut (.word_i(w), .data_o(d), .parity_err_o(perr));

  initial begin
    #100000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 2000; i++) begin
      logic [31:0] data;
      logic [32:0] flips;
      int          nflip;
      data  = $urandom;
      nflip = $urandom_range(3);
      flips = '0;
      while ($countones(flips) < nflip) flips[$urandom_range(32)] = 1'b1;
      w = {1'($countones(data) % 2), data} ^ flips;
      #1;
      checks += 2;
      if (d != w[31:0]) begin failures++; $display("FAIL data"); end
      if (perr != (nflip % 2 == 1)) begin
        failures++;
        $display("FAIL perr=%b with %0d flips", perr, nflip);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
