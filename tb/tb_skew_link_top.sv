// tb_skew_link_top: end-to-end test of the link at its default size
// (32-bit words, 66 wires) through a timed wire model with noise.
//
// One random word enters per nominal cycle and must leave four cycles later.
// The wire model checks the skewing: every transition must see both of its
// neighbours quiet. Noise flips wires of a word during its first sample, its
// second sample or both, on one or two wires; the expected flags are worked
// out from the injected masks: temporal flag when the two samples of a wire
// differ, parity flag when the first sample has an odd number of flips, and a
// retransmission request for either. Two wires flipped in both samples pass
// undetected, which the test expects. Counted mechanisms, each of which must
// happen: words on the even wires, words on the odd wires, temporal
// detections, parity detections, retransmission requests, undetected double
// faults and quiet-neighbour transitions.
module tb_skew_link_top;
  import skew_pkg::*;
  int checks = 0, failures = 0;
  int n_even = 0, n_odd = 0, n_temporal = 0, n_parity = 0, n_retx = 0, n_silent = 0;

  localparam int N = 4000;

  logic clk = 1'b0, rst_n = 1'b0;
  logic [DATA_W-1:0] din, dout;
  logic [BUS_W-1:0]  bus_tx, bus_rx, noise;
  logic              txc;
  logic              terr, perr, retx;

  logic [WORD_W-1:0] w_code [0:N-1];
  logic [WORD_W-1:0] w_m1   [0:N-1];
  logic [WORD_W-1:0] w_m2   [0:N-1];

  skew_link_top dut (
    .clk(clk), .rst_n(rst_n), .data_i(din),
    .bus_o(bus_tx), .tx_clk_o(txc),
    .bus_i(bus_rx), .tx_clk_i(txc),
    .data_o(dout), .temporal_err_o(terr), .parity_err_o(perr), .retx_o(retx)
  );

  bus_wire_model #(.W(BUS_W)) u_wires (.bus_i(bus_tx), .noise_i(noise), .bus_o(bus_rx));

  always #5 clk = ~clk;

  function automatic logic [BUS_W-1:0] place(logic [WORD_W-1:0] m, bit odd);
    logic [BUS_W-1:0] b = '0;
    for (int i = 0; i < WORD_W; i++) b[2*i + (odd ? 1 : 0)] = m[i];
    return b;
  endfunction

  function automatic logic [WORD_W-1:0] one_hot_rand();
    return WORD_W'(1) << $urandom_range(WORD_W-1);
  endfunction

  initial begin
    #((N + 100) * 10ns);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    noise = '0;
    din   = '0;
    repeat (2) @(negedge clk);
    // Registers settle to their reset values here; count from now on.
    u_wires.n_quiet   = 0;
    u_wires.n_coupled = 0;
    rst_n = 1'b1;
    for (int k = 0; k < N + 5; k++) begin
      // Word k is sampled at edge k and launched at edge k+1.
      if (k < N) begin
        int kind;
        din = $urandom;
        w_code[k] = {1'($countones(din) % 2), din};
        kind = ($urandom_range(2) != 0) ? 0 : $urandom_range(1, 4);
        w_m1[k] = '0;
        w_m2[k] = '0;
        case (kind)
          1: w_m1[k] = one_hot_rand();
          2: w_m2[k] = one_hot_rand();
          3: begin w_m1[k] = one_hot_rand(); w_m2[k] = w_m1[k]; end
          4: begin
               w_m1[k] = one_hot_rand();
               do w_m2[k] = one_hot_rand(); while (w_m2[k] == w_m1[k]);
               w_m1[k] |= w_m2[k];
               w_m2[k] = w_m1[k];
             end
          default: ;
        endcase
      end else begin
        din = '0;
      end
      @(posedge clk);
      @(negedge clk);
      // After edge k the words launched at k (word k-1) and k-1 (word k-2)
      // are on the wires; word k-1 is on the even wires when the
      // transmission clock has just risen.
      if (k >= 1 && k - 1 < N) begin
        if (txc) n_even++;
        else     n_odd++;
        checks++;
        if (txc != ((k - 1) % 2 == 1)) begin failures++; $display("FAIL word %0d on wrong group", k - 1); end
      end
      noise = '0;
      if (k >= 1 && k - 1 < N) noise |= place(w_m1[k-1], !txc);
      if (k >= 2 && k - 2 < N) noise |= place(w_m2[k-2], txc);
      if (k >= 4 && k - 4 < N) begin
        int n;
        logic [WORD_W-1:0] rx;
        bit et, ep;
        n  = k - 4;
        rx = w_code[n] ^ w_m1[n];
        et = (w_m1[n] != w_m2[n]);
        ep = 1'($countones(w_m1[n]) % 2);
        checks += 4;
        if (dout != rx[DATA_W-1:0]) begin failures++; $display("FAIL word %0d data %h exp %h", n, dout, rx[DATA_W-1:0]); end
        if (terr != et) begin failures++; $display("FAIL word %0d temporal %b", n, terr); end
        if (perr != ep) begin failures++; $display("FAIL word %0d parity %b", n, perr); end
        if (retx != (et | ep)) begin failures++; $display("FAIL word %0d retx %b", n, retx); end
        if (terr) n_temporal++;
        if (perr) n_parity++;
        if (retx) n_retx++;
        if (!retx && w_m1[n] != '0) n_silent++;
      end
    end
    $display("words on even wires %0d, on odd wires %0d", n_even, n_odd);
    $display("temporal detections %0d, parity detections %0d, retransmission requests %0d, undetected double faults %0d",
             n_temporal, n_parity, n_retx, n_silent);
    $display("wire transitions with quiet neighbours %0d, with switching neighbours %0d",
             u_wires.n_quiet, u_wires.n_coupled);
    checks += 8;
    if (n_even == 0)     begin failures++; $display("FAIL no word on even wires"); end
    if (n_odd == 0)      begin failures++; $display("FAIL no word on odd wires"); end
    if (n_temporal == 0) begin failures++; $display("FAIL no temporal detection"); end
    if (n_parity == 0)   begin failures++; $display("FAIL no parity detection"); end
    if (n_retx == 0)     begin failures++; $display("FAIL no retransmission request"); end
    if (n_silent == 0)   begin failures++; $display("FAIL no undetected double fault"); end
    if (u_wires.n_quiet == 0) begin failures++; $display("FAIL bus never switched"); end
    if (u_wires.n_coupled != 0) begin failures++; $display("FAIL adjacent wires switched together"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
