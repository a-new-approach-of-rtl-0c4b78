// tb_residual_error: Monte-Carlo run of the link on 8-bit words with random
// noise on every sample, the configuration of the residual word error study.
//
// Every bit sample taken by the receiver is flipped independently with
// probability EPS_PPM / 1e6 (a stand-in for Q(Vdd / 2 sigma_N)). Each word's
// flags are checked against the injected flips as in the end-to-end test.
// The run also counts, from the same flips, how many words would have been
// wrong without coding (any of the 8 data bits hit in the first sample), how
// many a plain parity check on one sample would have let through (an even,
// non-zero number of the 9 wires hit), and how many this link lets through
// (temporal and parity checks both pass on a wrong word). The link must let
// through no more words than plain parity, which must let through no more
// than an unprotected bus delivers wrong.
module tb_residual_error;
  int checks = 0, failures = 0;

  localparam int unsigned DW      = 8;
  localparam int unsigned WW      = DW + 1;
  localparam int unsigned BW      = 2 * WW;
  localparam int          N       = 40000;
  localparam int unsigned EPS_PPM = 50000;

  int n_raw_bad = 0, n_par_missed = 0, n_link_missed = 0, n_retx = 0;

  logic clk = 1'b0, rst_n = 1'b0;
  logic [DW-1:0] din, dout;
  logic [BW-1:0] bus_tx, bus_rx, noise;
  logic          txc, terr, perr, retx;

  logic [WW-1:0] w_code [0:N-1];
  logic [WW-1:0] w_m1   [0:N-1];
  logic [WW-1:0] w_m2   [0:N-1];

  skew_link_top #(.DW(DW)) dut (
    .clk(clk), .rst_n(rst_n), .data_i(din),
    .bus_o(bus_tx), .tx_clk_o(txc),
    .bus_i(bus_rx), .tx_clk_i(txc),
    .data_o(dout), .temporal_err_o(terr), .parity_err_o(perr), .retx_o(retx)
  );

  assign bus_rx = bus_tx ^ noise;

  always #5 clk = ~clk;

  function automatic logic [BW-1:0] place(logic [WW-1:0] m, bit odd);
    logic [BW-1:0] b = '0;
    for (int i = 0; i < WW; i++) b[2*i + (odd ? 1 : 0)] = m[i];
    return b;
  endfunction

  function automatic logic [WW-1:0] rand_mask();
    logic [WW-1:0] m;
    for (int i = 0; i < WW; i++) m[i] = ($urandom_range(999_999) < EPS_PPM);
    return m;
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
    rst_n = 1'b1;
    for (int k = 0; k < N + 5; k++) begin
      if (k < N) begin
        din       = DW'($urandom);
        w_code[k] = {1'($countones(din) % 2), din};
        w_m1[k]   = rand_mask();
        w_m2[k]   = rand_mask();
      end else begin
        din = '0;
      end
      @(posedge clk);
      @(negedge clk);
      noise = '0;
      if (k >= 1 && k - 1 < N) noise |= place(w_m1[k-1], !txc);
      if (k >= 2 && k - 2 < N) noise |= place(w_m2[k-2], txc);
      if (k >= 4 && k - 4 < N) begin
        int n;
        logic [WW-1:0] rx;
        bit et, ep, wrong;
        n     = k - 4;
        rx    = w_code[n] ^ w_m1[n];
        et    = (w_m1[n] != w_m2[n]);
        ep    = 1'($countones(w_m1[n]) % 2);
        wrong = (w_m1[n][DW-1:0] != '0);
        checks += 4;
        if (dout != rx[DW-1:0]) begin failures++; $display("FAIL word %0d data", n); end
        if (terr != et) begin failures++; $display("FAIL word %0d temporal", n); end
        if (perr != ep) begin failures++; $display("FAIL word %0d parity", n); end
        if (retx != (et | ep)) begin failures++; $display("FAIL word %0d retx", n); end
        if (wrong) n_raw_bad++;
        if (w_m1[n] != '0 && !ep && wrong) n_par_missed++;
        if (!retx && dout != w_code[n][DW-1:0]) n_link_missed++;
        if (retx) n_retx++;
      end
    end
    $display("sample flip probability %0d ppm, %0d words", EPS_PPM, N);
    $display("wrong words, no coding: %0d", n_raw_bad);
    $display("wrong words missed by one-sample parity: %0d", n_par_missed);
    $display("wrong words missed by this link: %0d (retransmission requests %0d)", n_link_missed, n_retx);
    checks += 3;
    if (n_raw_bad == 0) begin failures++; $display("FAIL no noise reached the data"); end
    if (n_par_missed > n_raw_bad) begin failures++; $display("FAIL parity worse than no coding"); end
    if (n_link_missed > n_par_missed) begin failures++; $display("FAIL link worse than parity"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
