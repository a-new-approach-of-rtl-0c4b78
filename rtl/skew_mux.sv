// skew_mux: picks the even or the odd wire group.
//
// Combinational 2:1 multiplexer of W-bit vectors: y_o is even_i when sel_i is
// GRP_EVEN and odd_i when it is GRP_ODD. In the decoder the select follows the
// transmission clock, so each nominal cycle the mux passes the group whose two
// samples are complete, as in the reference design.
module skew_mux
  import skew_pkg::*;
#(
  parameter int unsigned W = WORD_W
) (
  input  logic [W-1:0] even_i,
  input  logic [W-1:0] odd_i,
  input  group_e       sel_i,
  output logic [W-1:0] y_o
);

  assign y_o = (sel_i == GRP_EVEN) ? even_i : odd_i;

endmodule
