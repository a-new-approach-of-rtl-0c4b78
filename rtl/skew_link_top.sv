// skew_link_top: one complete link, encoder and decoder, with the wires
// between them left outside.
//
// data_i enters the encoder every nominal clock cycle; the encoder drives the
// 2*(DATA_W+1) bus wires bus_o and the forwarded transmission clock tx_clk_o.
// The physical wires are not logic, so they are not modelled here: connect
// bus_o to bus_i and tx_clk_o to tx_clk_i directly, or through a wire or
// noise model. The decoder returns each word on data_o four clk cycles after
// it was sampled from data_i, with its temporal check, parity check and
// retransmission request flags. Encoder and decoder share clk and rst_n
// (asynchronous, active low), which is this design's choice; the reference
// design leaves the retransmission process to the surrounding interconnect,
// and retx_o is where it would attach.
module skew_link_top
  import skew_pkg::*;
#(
  parameter int unsigned DW = DATA_W
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic [DW-1:0]       data_i,
  output logic [2*(DW+1)-1:0] bus_o,
  output logic                tx_clk_o,
  input  logic [2*(DW+1)-1:0] bus_i,
  input  logic                tx_clk_i,
  output logic [DW-1:0]       data_o,
  output logic                temporal_err_o,
  output logic                parity_err_o,
  output logic                retx_o
);

  skew_encoder #(.DW(DW)) u_enc (
    .clk     (clk),
    .rst_n   (rst_n),
    .data_i  (data_i),
    .bus_o   (bus_o),
    .tx_clk_o(tx_clk_o)
  );

  skew_decoder #(.DW(DW)) u_dec (
    .clk           (clk),
    .rst_n         (rst_n),
    .bus_i         (bus_i),
    .tx_clk_i      (tx_clk_i),
    .data_o        (data_o),
    .temporal_err_o(temporal_err_o),
    .parity_err_o  (parity_err_o),
    .retx_o        (retx_o)
  );

endmodule
