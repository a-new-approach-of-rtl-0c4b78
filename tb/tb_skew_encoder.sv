// tb_skew_encoder: feeds one random word per nominal cycle and checks, after
// every clock edge, that
//  - the word sampled at edge n (first edge after reset is 0) is on the odd
//    wires for even n and on the even wires for odd n, with its parity bit,
//    from edge n+1 until edge n+3 (two-cycle latency, one transmission period
//    of stability);
//  - the forwarded transmission clock has twice the nominal period;
//  - no two adjacent wires ever change at the same edge (the skewing).
module tb_skew_encoder;
  import skew_pkg::*;
  int checks = 0, failures = 0;
  int adj_pairs_seen = 0, wire_changes = 0;

  logic clk = 1'b0, rst_n = 1'b0;
  logic [DATA_W-1:0] din;
  logic [BUS_W-1:0]  bus, bus_prev;
  logic              txc;
  logic [DATA_W-1:0] sent [0:1023];

  skew_encoder dut (.clk(clk), .rst_n(rst_n), .data_i(din), .bus_o(bus), .tx_clk_o(txc));

  always #5 clk = ~clk;

  function automatic logic [WORD_W-1:0] code(logic [DATA_W-1:0] d);
    return {1'($countones(d) % 2), d};
  endfunction

  function automatic logic [WORD_W-1:0] group_of(logic [BUS_W-1:0] b, bit odd);
    logic [WORD_W-1:0] g;
    for (int i = 0; i < WORD_W; i++) g[i] = b[2*i + (odd ? 1 : 0)];
    return g;
  endfunction

  initial begin
    #200000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [BUS_W-1:0] ch;
    din = '0;
    repeat (2) @(negedge clk);
    checks++;
    if (bus != '0 || txc != 1'b0) begin failures++; $display("FAIL reset state"); end
    rst_n = 1'b1;
    bus_prev = bus;
    for (int k = 0; k < 1000; k++) begin
      sent[k] = $urandom;
      din = sent[k];
      @(posedge clk);
      @(negedge clk);
      // After edge k.
      checks++;
      if (txc != ((k % 2) == 0)) begin failures++; $display("FAIL txc at edge %0d", k); end
      if (k >= 1) begin
        checks++;
        if (group_of(bus, ((k-1) % 2) == 0) != code(sent[k-1])) begin
          failures++;
          $display("FAIL edge %0d: word %0d missing", k, k-1);
        end
      end
      if (k >= 2) begin
        checks++;
        if (group_of(bus, ((k-2) % 2) == 0) != code(sent[k-2])) begin
          failures++;
          $display("FAIL edge %0d: word %0d not held", k, k-2);
        end
      end
      ch = bus ^ bus_prev;
      wire_changes += $countones(ch);
      checks++;
      if ((ch & (ch >> 1)) != '0) begin
        failures++;
        adj_pairs_seen++;
        $display("FAIL edge %0d: adjacent wires switched together %h", k, ch);
      end
      bus_prev = bus;
    end
    if (wire_changes == 0) begin failures++; $display("FAIL bus never switched"); end
    $display("wire transitions seen: %0d", wire_changes);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
