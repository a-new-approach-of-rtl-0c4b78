// parity_check: spatial error check of a received coded word.
//
// word_i is {parity, data} with DW data bits. The parity of the data bits is
// recomputed with the same XOR tree as the encoder (parity_gen) and compared
// with the received parity bit; parity_err_o is 1 when they differ, i.e. when
// an odd number of the DW+1 bits was corrupted. data_o is the data part,
// passed straight through: the check only flags, it corrects nothing.
// Combinational; follows the reference design (even parity is this design's
// choice, matching the encoder).
module parity_check #(
  parameter int unsigned DW = 32
) (
  input  logic [DW:0]   word_i,
  output logic [DW-1:0] data_o,
  output logic          parity_err_o
);

  logic parity;

  parity_gen #(.W(DW)) u_parity (
    .data_i  (word_i[DW-1:0]),
    .parity_o(parity)
  );

  assign data_o       = word_i[DW-1:0];
  assign parity_err_o = parity ^ word_i[DW];

endmodule
