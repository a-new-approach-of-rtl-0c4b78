// parity_gen: parity bit of a data word, computed by an XOR tree.
//
// parity_o is the XOR of all W bits of data_i, so the coded word
// {parity_o, data_i} always holds an even number of ones (even parity). The
// block is purely combinational. The XOR tree follows the reference design;
// the choice of even rather than odd parity is this design's own.
module parity_gen #(
  parameter int unsigned W = 32
) (
  input  logic [W-1:0] data_i,
  output logic         parity_o
);

  // Balanced tree: each level XORs neighbouring pairs of the level below.
  localparam int unsigned LEVELS = (W > 1) ? $clog2(W) : 1;
  localparam int unsigned LEAVES = 1 << LEVELS;

  logic [LEAVES-1:0] lvl [LEVELS+1];

  always_comb begin
    lvl[0] = '0;
    lvl[0][W-1:0] = data_i;
    for (int unsigned l = 1; l <= LEVELS; l++) begin
      lvl[l] = '0;
      for (int unsigned i = 0; i < (LEAVES >> l); i++) begin
        lvl[l][i] = lvl[l-1][2*i] ^ lvl[l-1][2*i+1];
      end
    end
  end

  assign parity_o = lvl[LEVELS][0];

endmodule
