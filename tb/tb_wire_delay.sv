// tb_wire_delay: speed of the skewed link on 1 mm and 10 mm wires.
//
// Two full-size links run through the timed wire model, one with 1 mm and
// one with 10 mm wire delays. Each runs its nominal clock just above the
// delay of a wire with quiet neighbours (0.60 ns and 1.42 ns, the slower,
// falling case), so a transmission period is twice that. Every word must
// arrive intact and unflagged, and no transition may take longer than the
// quiet-neighbour delay. The ratio of the worst delay of an unskewed bus
// (both neighbours switching the other way: 1.41 ns and 3.29 ns) to the
// worst delay seen is the speed-up of the skewed link; it must be at least
// 2.3 for both lengths.
module tb_wire_delay;
  int checks = 0, failures = 0;

  logic done_1, done_10;
  int   chk_1, chk_10, fail_1, fail_10, max_1, max_10;

  link_delay_run #(.LONG_10(1'b0), .PERIOD_PS(700))  run_1mm  (
    .done(done_1), .checks(chk_1), .failures(fail_1), .max_delay_ps(max_1));
  link_delay_run #(.LONG_10(1'b1), .PERIOD_PS(1500)) run_10mm (
    .done(done_10), .checks(chk_10), .failures(fail_10), .max_delay_ps(max_10));

  initial begin
    #100us;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    wait (done_1 && done_10);
    checks   = chk_1 + chk_10;
    failures = fail_1 + fail_10;
    $display("1 mm : worst wire delay %0d ps, speed-up %0.2f over 1410 ps", max_1, 1410.0 / max_1);
    $display("10 mm: worst wire delay %0d ps, speed-up %0.2f over 3290 ps", max_10, 3290.0 / max_10);
    checks += 4;
    if (max_1 == 0 || max_1 > 600)    begin failures++; $display("FAIL 1 mm worst delay"); end
    if (max_10 == 0 || max_10 > 1420) begin failures++; $display("FAIL 10 mm worst delay"); end
    if (1410.0 / max_1 < 2.3)  begin failures++; $display("FAIL 1 mm speed-up"); end
    if (3290.0 / max_10 < 2.3) begin failures++; $display("FAIL 10 mm speed-up"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
