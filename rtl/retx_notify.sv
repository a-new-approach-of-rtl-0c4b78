// retx_notify: retransmission notification, an OR tree over all error checks.
//
// terr_i holds one temporal-check flag per wire of the received word (the two
// samples of that wire differed), perr_i the parity-check result. temporal_o
// is the OR of the temporal flags and retx_o requests retransmission of the
// word when any check failed. Combinational. The reference design leaves the
// retransmission process itself to the bus or network that carries the data
// and uses an OR tree as its notification; that is what this block is.
module retx_notify #(
  parameter int unsigned N = 33
) (
  input  logic [N-1:0] terr_i,
  input  logic         perr_i,
  output logic         temporal_o,
  output logic         retx_o
);

  assign temporal_o = |terr_i;
  assign retx_o     = temporal_o | perr_i;

endmodule
