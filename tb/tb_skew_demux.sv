// tb_skew_demux: the selected output carries the word, the other is zero.
module tb_skew_demux;
  import skew_pkg::*;
  int checks = 0, failures = 0;
  logic [WORD_W-1:0] w, e, o;
  group_e sel;

  skew_demux dut (.word_i(w), .sel_i(sel), .even_o(e), .odd_o(o));

  initial begin
    #100000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 1000; i++) begin
      w   = {$urandom, $urandom};
      sel = group_e'($urandom_range(1));
      #1;
      checks++;
      if (sel == GRP_EVEN ? (e != w || o != '0) : (o != w || e != '0)) begin
        failures++;
        $display("FAIL sel=%s w=%h e=%h o=%h", sel.name(), w, e, o);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
