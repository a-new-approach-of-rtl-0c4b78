// skew_demux: steers each coded word to the even or the odd wire group.
//
// Combinational. When sel_i is GRP_EVEN the word appears on even_o and odd_o
// is all zeros; when it is GRP_ODD the reverse. The encoder drives sel_i with
// the transmission clock, so consecutive words of the nominal-rate stream go
// alternately to the two halves of the bus, as in the reference design. Zeros
// on the unselected output are this design's choice: the sender bank there
// does not load in that cycle.
module skew_demux
  import skew_pkg::*;
#(
  parameter int unsigned W = WORD_W
) (
  input  logic [W-1:0] word_i,
  input  group_e       sel_i,
  output logic [W-1:0] even_o,
  output logic [W-1:0] odd_o
);

  always_comb begin
    even_o = '0;
    odd_o  = '0;
    if (sel_i == GRP_EVEN) even_o = word_i;
    else                   odd_o  = word_i;
  end

endmodule
