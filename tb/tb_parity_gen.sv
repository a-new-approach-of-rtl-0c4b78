// tb_parity_gen: checks the XOR-tree parity against a bit count.
// Drives random and corner-case words into a 32-bit and an 8-bit instance and
// compares parity_o with the number of ones modulo 2.
module tb_parity_gen;
  int checks = 0, failures = 0;

  logic [31:0] d32;
  logic [7:0]  d8;
  logic        p32, p8;

  parity_gen #(.W(32)) dut32 (.data_i(d32), .parity_o(p32));
  parity_gen #(.W(8))  dut8  (.data_i(d8),  .parity_o(p8));

  task automatic apply(logic [31:0] v);
    d32 = v;
    d8  = v[7:0];
    #1;
    checks += 2;
    if (p32 != 1'($countones(v) % 2)) begin
      failures++;
      $display("FAIL parity32 of %h: got %b", v, p32);
    end
    if (p8 != 1'($countones(v[7:0]) % 2)) begin
      failures++;
      $display("FAIL parity8 of %h: got %b", v[7:0], p8);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    apply(32'h0);
    apply(32'hFFFF_FFFF);
    for (int i = 0; i < 32; i++) apply(32'h1 << i);
    for (int i = 0; i < 2000; i++) apply($urandom);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
