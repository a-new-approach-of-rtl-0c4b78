// skew_sender: bank of bus drivers that launch on one edge of the
// transmission clock.
//
// One register per wire. With EDGE = EDGE_RISE the bank loads d_i on the
// rising edges of the transmission clock only, with EDGE = EDGE_FALL on its
// falling edges only, and holds q_i in between, so each wire changes once per
// transmission period and stays stable for a whole period. Two banks, one of
// each kind, drive interleaved wires, so no two adjacent wires ever change at
// the same instant: their transitions are half a transmission period apart.
//
// The reference design builds the banks from positive- and negative-edge
// flip-flops clocked by the transmission clock. Here both banks are clocked
// by the nominal clock clk (twice as fast) and enabled on alternate cycles by
// the registered transmission clock tx_clk_i (see tx_phase_gen); the launch
// instants are the same, and the whole link stays in one clock domain. The
// outputs are cleared by the asynchronous, active-low reset, which is this
// design's choice.
module skew_sender
  import skew_pkg::*;
#(
  parameter int unsigned W    = WORD_W,
  parameter tx_edge_e    EDGE = EDGE_RISE
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         tx_clk_i,
  input  logic [W-1:0] d_i,
  output logic [W-1:0] q_o
);

  // The clk edge is a rising transmission-clock edge when tx_clk_i is low
  // before it, a falling one when it is high.
  logic load;
  assign load = (EDGE == EDGE_RISE) ? ~tx_clk_i : tx_clk_i;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)    q_o <= '0;
    else if (load) q_o <= d_i;
  end

endmodule
