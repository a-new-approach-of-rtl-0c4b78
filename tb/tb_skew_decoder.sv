// tb_skew_decoder: drives the bus as a skewed encoder would and injects noise.
//
// The testbench launches one coded word per nominal cycle, alternately on the
// even wires (rising transmission-clock edges) and the odd wires (falling
// edges), and forwards the transmission clock. For a word launched at edge a
// the decoder samples its wires at edges a+1 and a+2; the testbench can flip
// wires of that word's group during either sample or both. Expected outputs,
// three cycles after launch: data and parity check taken from the first
// sample, the temporal flag set when the two samples of some wire differ, the
// retransmission request when either check fails. Each kind of fault must
// occur at least once.
module tb_skew_decoder;
  import skew_pkg::*;
  int checks = 0, failures = 0;
  int n_kind [5];

  logic clk = 1'b0, rst_n = 1'b0;
  logic [BUS_W-1:0]  bus, noise;
  logic              txc;
  logic [WORD_W-1:0] ev, od, nextw;
  logic [DATA_W-1:0] dout;
  logic              terr, perr, retx;

  // Per launched word: coded value and the masks hitting its two samples.
  logic [WORD_W-1:0] w_code [0:2047];
  logic [WORD_W-1:0] w_m1   [0:2047];
  logic [WORD_W-1:0] w_m2   [0:2047];

  skew_decoder dut (.clk(clk), .rst_n(rst_n), .bus_i(bus), .tx_clk_i(txc),
                    .data_o(dout), .temporal_err_o(terr), .parity_err_o(perr), .retx_o(retx));

  always #5 clk = ~clk;

  // Transmit side model.
  always @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      txc <= 1'b0;
      ev  <= '0;
      od  <= '0;
    end else begin
      txc <= ~txc;
      if (!txc) ev <= nextw;
      else      od <= nextw;
    end
  end

  function automatic logic [BUS_W-1:0] place(logic [WORD_W-1:0] m, bit odd);
    logic [BUS_W-1:0] b = '0;
    for (int i = 0; i < WORD_W; i++) b[2*i + (odd ? 1 : 0)] = m[i];
    return b;
  endfunction

  always_comb bus = (place(ev, 1'b0) | place(od, 1'b1)) ^ noise;

  function automatic logic [WORD_W-1:0] one_hot_rand();
    return WORD_W'(1) << $urandom_range(WORD_W-1);
  endfunction

  initial begin
    #300000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int N;
    N = 2000;
    noise = '0;
    nextw = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int k = 0; k < N + 4; k++) begin
      // Word to be launched at edge k.
      if (k < N) begin
        logic [DATA_W-1:0] d;
        int kind;
        d = $urandom;
        w_code[k] = {1'($countones(d) % 2), d};
        kind = ($urandom_range(1) == 0) ? 0 : $urandom_range(1, 4);
        w_m1[k] = '0;
        w_m2[k] = '0;
        case (kind)
          1: w_m1[k] = one_hot_rand();                 // first sample hit
          2: w_m2[k] = one_hot_rand();                 // second sample hit
          3: begin w_m1[k] = one_hot_rand(); w_m2[k] = w_m1[k]; end   // both samples, one wire
          4: begin                                     // both samples, two wires
               w_m1[k] = one_hot_rand();
               do w_m2[k] = one_hot_rand(); while (w_m2[k] == w_m1[k]);
               w_m1[k] |= w_m2[k];
               w_m2[k] = w_m1[k];
             end
          default: ;
        endcase
        n_kind[kind]++;
        nextw = w_code[k];
      end else begin
        nextw = '0;
      end
      @(posedge clk);
      @(negedge clk);
      // After edge k: word k is on its wires until its first sample at k+1,
      // word k-1 until its second sample at k+1.
      noise = '0;
      if (k < N) noise |= place(w_m1[k], (k % 2) == 1);
      if (k >= 1 && k - 1 < N) noise |= place(w_m2[k-1], ((k-1) % 2) == 1);
      if (k >= 3 && k - 3 < N) begin
        int a;
        logic [WORD_W-1:0] rx;
        bit et, ep;
        a  = k - 3;
        rx = w_code[a] ^ w_m1[a];
        et = (w_m1[a] != w_m2[a]);
        ep = 1'($countones(w_m1[a]) % 2);
        checks += 4;
        if (dout != rx[DATA_W-1:0]) begin failures++; $display("FAIL word %0d data %h exp %h", a, dout, rx[DATA_W-1:0]); end
        if (terr != et) begin failures++; $display("FAIL word %0d temporal %b", a, terr); end
        if (perr != ep) begin failures++; $display("FAIL word %0d parity %b", a, perr); end
        if (retx != (et | ep)) begin failures++; $display("FAIL word %0d retx %b", a, retx); end
      end
    end
    for (int i = 0; i < 5; i++) begin
      $display("fault kind %0d: %0d words", i, n_kind[i]);
      checks++;
      if (n_kind[i] == 0) begin failures++; $display("FAIL fault kind %0d never injected", i); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
