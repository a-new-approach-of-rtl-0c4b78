// tb_retx_notify: the request is raised exactly when some check failed.
module tb_retx_notify;
  int checks = 0, failures = 0;
  logic [32:0] terr;
  logic        perr, temporal, retx;

  retx_notify #(.N(33)) dut (.terr_i(terr), .perr_i(perr),
                             .temporal_o(temporal), .retx_o(retx));

  task automatic apply(logic [32:0] t, logic p);
    bit exp_t;
    terr = t;
    perr = p;
    #1;
    exp_t = 1'b0;
    for (int i = 0; i < 33; i++) if (t[i]) exp_t = 1'b1;
    checks += 2;
    if (temporal != exp_t) begin failures++; $display("FAIL temporal t=%h", t); end
    if (retx != (exp_t || p)) begin failures++; $display("FAIL retx t=%h p=%b", t, p); end
  endtask

  initial begin
    #100000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    apply('0, 1'b0);
    apply('0, 1'b1);
    for (int i = 0; i < 33; i++) begin
      apply(33'h1 << i, 1'b0);
      apply(33'h1 << i, 1'b1);
    end
    for (int i = 0; i < 500; i++)
      apply(($urandom_range(1) != 0) ? 33'({$urandom, $urandom}) : '0, 1'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
