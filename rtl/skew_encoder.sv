// skew_encoder: transmit side of the skewed, parity-protected link.
//
// Every nominal clock cycle one DATA_W-bit word enters on data_i. An XOR tree
// (parity_gen) adds its parity bit, and the coded word {parity, data} is
// registered. A demux (skew_demux) then hands the registered word to one of
// two sender banks (skew_sender): the bank of even wires launches on rising
// edges of the transmission clock, the bank of odd wires on its falling edges.
// The transmission clock runs at half the nominal rate (tx_phase_gen), so each
// wire carries a new bit once per transmission period, stays stable for two
// nominal cycles, and its two neighbours change half a period away from it.
// Two words are thus in flight on the 2*WORD_W wires at any time, which is how
// the link doubles its bandwidth without ever letting adjacent wires switch
// together.
//
// Timing: a word sampled from data_i at clk edge n is on the bus from edge n+1
// until edge n+3. Words sampled at even-numbered edges after reset (counting
// the first edge as 0) go to the odd wires, the others to the even wires.
// tx_clk_o is the transmission clock, forwarded to the receiver with the bus.
// The structure (parity tree, 33-bit register, demux, alternate rising- and
// falling-edge senders, interleaved wires) follows the reference design; the
// wire order and the reset are this design's choices.
module skew_encoder
  import skew_pkg::*;
#(
  parameter int unsigned DW = DATA_W
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic [DW-1:0]       data_i,
  output logic [2*(DW+1)-1:0] bus_o,
  output logic                tx_clk_o
);

  localparam int unsigned WW = DW + 1;

  logic          parity;
  logic [WW-1:0] word_q;
  logic [WW-1:0] to_even, to_odd;
  logic [WW-1:0] even_q, odd_q;
  logic          tx_clk;
  group_e        sel;

  parity_gen #(.W(DW)) u_parity (
    .data_i  (data_i),
    .parity_o(parity)
  );

  // Input register at the nominal rate.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) word_q <= '0;
    else        word_q <= {parity, data_i};
  end

  tx_phase_gen u_phase (
    .clk     (clk),
    .rst_n   (rst_n),
    .tx_clk_o(tx_clk)
  );

  // The word goes to the bank that loads on the coming clk edge.
  assign sel = tx_clk ? GRP_ODD : GRP_EVEN;

  skew_demux #(.W(WW)) u_demux (
    .word_i(word_q),
    .sel_i (sel),
    .even_o(to_even),
    .odd_o (to_odd)
  );

  skew_sender #(.W(WW), .EDGE(EDGE_RISE)) u_send_even (
    .clk     (clk),
    .rst_n   (rst_n),
    .tx_clk_i(tx_clk),
    .d_i     (to_even),
    .q_o     (even_q)
  );

  skew_sender #(.W(WW), .EDGE(EDGE_FALL)) u_send_odd (
    .clk     (clk),
    .rst_n   (rst_n),
    .tx_clk_i(tx_clk),
    .d_i     (to_odd),
    .q_o     (odd_q)
  );

  // Interleave: even wires from the rising-edge bank, odd from the falling.
  always_comb begin
    for (int unsigned i = 0; i < WW; i++) begin
      bus_o[2*i]   = even_q[i];
      bus_o[2*i+1] = odd_q[i];
    end
  end

  assign tx_clk_o = tx_clk;

  // The rule the skewing exists for: two adjacent wires never switch at the
  // same clock edge, so at most one bank (WW wires) switches per edge.
  logic [2*WW-1:0] bus_q;
  logic [2*WW-1:0] bus_ch;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) bus_q <= '0;
    else        bus_q <= bus_o;
  end

  assign bus_ch = bus_o ^ bus_q;

  a_no_adjacent_switching: assert property (
    @(posedge clk) disable iff (!rst_n) (bus_ch & (bus_ch >> 1)) == '0
  ) else $error("adjacent bus wires switched in the same cycle");

endmodule
