// tb_skew_mux: the output follows the selected group.
module tb_skew_mux;
  import skew_pkg::*;
  int checks = 0, failures = 0;
  logic [WORD_W-1:0] e, o, y;
  group_e sel;

  skew_mux dut (.even_i(e), .odd_i(o), .sel_i(sel), .y_o(y));

  initial begin
    #100000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 1000; i++) begin
      e   = {$urandom, $urandom};
      o   = {$urandom, $urandom};
      sel = group_e'($urandom_range(1));
      #1;
      checks++;
      if (y != (sel == GRP_EVEN ? e : o)) begin
        failures++;
        $display("FAIL sel=%s y=%h", sel.name(), y);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
