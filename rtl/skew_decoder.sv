// skew_decoder: receive side of the skewed, parity-protected link.
//
// All 2*(DW+1) bus wires go through oversampling receivers (skew_receiver)
// clocked at the nominal rate, which is twice the transmission rate: every
// bit is sampled twice, before and after its neighbours switch. The forwarded
// transmission clock tx_clk_i is sampled along with the wires and steers a mux
// (skew_mux) that, each nominal cycle, takes the group of wires (even or odd)
// whose two samples are both of the same bit. The selected word and its
// per-wire sample-mismatch flags are registered; the parity of the registered
// word is then checked (parity_check) and every failed check is ORed into a
// retransmission request (retx_notify).
//
// Timing: a word launched on the bus at clk edge a is on data_o, with its
// flags, after edge a+3 and for one cycle; one word leaves per nominal cycle.
// With skew_encoder that makes a latency of four cycles from data_i to data_o.
// temporal_err_o: two samples of some wire disagreed. parity_err_o: the parity
// check failed. retx_o: either, the word must be sent again. The structure
// follows the reference design; the registers for the flags, the sampling of
// the forwarded clock and the reset are this design's choices.
module skew_decoder
  import skew_pkg::*;
#(
  parameter int unsigned DW = DATA_W
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic [2*(DW+1)-1:0] bus_i,
  input  logic                tx_clk_i,
  output logic [DW-1:0]       data_o,
  output logic                temporal_err_o,
  output logic                parity_err_o,
  output logic                retx_o
);

  localparam int unsigned WW = DW + 1;
  localparam int unsigned BW = 2 * WW;

  logic [BW-1:0] samp, serr;
  logic [WW-1:0] even_w, odd_w, even_e, odd_e;
  logic [WW-1:0] word_sel, err_sel;
  logic [WW-1:0] word_q, err_q;
  logic          tx_clk_s;
  group_e        sel;

  skew_receiver #(.W(BW)) u_rx (
    .clk   (clk),
    .rst_n (rst_n),
    .line_i(bus_i),
    .samp_o(samp),
    .err_o (serr)
  );

  // Sampled transmission clock: low in the cycle where the even wires hold a
  // complete pair of samples, high where the odd wires do. It resets high
  // because the transmission clock resets low, i.e. has just fallen.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) tx_clk_s <= 1'b1;
    else        tx_clk_s <= tx_clk_i;
  end

  assign sel = tx_clk_s ? GRP_ODD : GRP_EVEN;

  // The forwarded transmission clock must toggle every nominal cycle, or the
  // mux would pick a group whose samples are not complete.
  a_tx_clk_toggles: assert property (
    @(posedge clk) disable iff (!rst_n) tx_clk_i != tx_clk_s
  ) else $error("forwarded transmission clock did not toggle");

  always_comb begin
    for (int unsigned i = 0; i < WW; i++) begin
      even_w[i] = samp[2*i];
      odd_w[i]  = samp[2*i+1];
      even_e[i] = serr[2*i];
      odd_e[i]  = serr[2*i+1];
    end
  end

  skew_mux #(.W(WW)) u_mux_word (
    .even_i(even_w),
    .odd_i (odd_w),
    .sel_i (sel),
    .y_o   (word_sel)
  );

  skew_mux #(.W(WW)) u_mux_err (
    .even_i(even_e),
    .odd_i (odd_e),
    .sel_i (sel),
    .y_o   (err_sel)
  );

  // Word register at the nominal rate.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      word_q <= '0;
      err_q  <= '0;
    end else begin
      word_q <= word_sel;
      err_q  <= err_sel;
    end
  end

  parity_check #(.DW(DW)) u_pchk (
    .word_i      (word_q),
    .data_o      (data_o),
    .parity_err_o(parity_err_o)
  );

  retx_notify #(.N(WW)) u_retx (
    .terr_i    (err_q),
    .perr_i    (parity_err_o),
    .temporal_o(temporal_err_o),
    .retx_o    (retx_o)
  );

endmodule
