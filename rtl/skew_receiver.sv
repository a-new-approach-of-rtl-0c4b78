// skew_receiver: bank of oversampling receivers, one per bus wire.
//
// Each wire is sampled by a register on every rising edge of the nominal clock,
// and a second register keeps the previous sample. A bit stays on its wire for
// one transmission period, i.e. two nominal cycles, so the two registers hold
// two samples of the same bit every other cycle: one taken before and one
// after the neighbouring wires switched. samp_o gives the earlier sample and
// err_o flags, per wire, that the two samples differ (the temporal error
// check). Which cycle holds a matching pair depends on the wire's group; the
// decoder's mux picks it. Two samples per bit and their comparison follow the
// reference design; the series connection of the two registers, the choice of
// the earlier sample as the data bit and the reset are this design's own.
module skew_receiver
  import skew_pkg::*;
#(
  parameter int unsigned W = BUS_W
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [W-1:0] line_i,
  output logic [W-1:0] samp_o,
  output logic [W-1:0] err_o
);

  logic [W-1:0] s_late, s_early;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s_late  <= '0;
      s_early <= '0;
    end else begin
      s_late  <= line_i;
      s_early <= s_late;
    end
  end

  assign samp_o = s_early;
  assign err_o  = s_early ^ s_late;

endmodule
