// bus_wire_model: timed behavioural model of the parallel on-chip wires
// between encoder and decoder (not synthesizable; testbench use only).
//
// Each wire copies its input to its output after a propagation delay that
// depends on what its two neighbours do at the same instant, using the
// delays of a 1 mm metal-2 wire in a 0.13 um process (victim V between
// aggressors A1 and A2):
//   A1 V A2 : up up up 0.17, up up - 0.24, up up down 0.31, - up - 0.47,
//             - up down 0.80, down up down 1.17 ns; the falling cases
//             0.18, 0.29, 0.49, 0.60, 1.05, 1.41 ns.
// With LONG_10 set, the 10 mm values are used instead: rising 0.32, 0.52,
// 1.36, 1.37, 2.44, 3.21 ns; falling 0.34, 0.55, 1.46, 1.42, 2.51, 3.29 ns.
// Mirror-image patterns take the same delay; an edge wire has one quiet
// neighbour. Every transition is also counted by class: n_quiet counts
// transitions whose neighbours were both quiet, n_coupled all others;
// max_delay_ps is the longest delay any transition took.
// noise_i is XORed onto the wire outputs to model disturbances.
module bus_wire_model #(
  parameter int unsigned W       = 66,
  parameter bit          LONG_10 = 1'b0   // 0: 1 mm wires, 1: 10 mm wires
) (
  input  logic [W-1:0] bus_i,
  input  logic [W-1:0] noise_i,
  output logic [W-1:0] bus_o
);

  logic [W-1:0] prev = '0;
  logic [W-1:0] line = '0;
  int n_quiet = 0, n_coupled = 0;
  int unsigned max_delay_ps = 0;

  // Neighbour state: 0 quiet, 1 same direction as the victim, 2 opposite.
  function automatic int unsigned delay_ps(bit rise, int unsigned a1, int unsigned a2);
    int unsigned same, opp;
    same = (a1 == 1) + (a2 == 1);
    opp  = (a1 == 2) + (a2 == 2);
    if (rise) begin
      if (same == 2) return LONG_10 ? 320 : 170;
      if (same == 1 && opp == 0) return LONG_10 ? 520 : 240;
      if (same == 1 && opp == 1) return LONG_10 ? 1360 : 310;
      if (opp == 0) return LONG_10 ? 1370 : 470;
      if (opp == 1) return LONG_10 ? 2440 : 800;
      return LONG_10 ? 3210 : 1170;
    end else begin
      if (same == 2) return LONG_10 ? 340 : 180;
      if (same == 1 && opp == 0) return LONG_10 ? 550 : 290;
      if (same == 1 && opp == 1) return LONG_10 ? 1460 : 490;
      if (opp == 0) return LONG_10 ? 1420 : 600;
      if (opp == 1) return LONG_10 ? 2510 : 1050;
      return LONG_10 ? 3290 : 1410;
    end
  endfunction

  always @(bus_i) begin
    logic [W-1:0] ch;
    ch = bus_i ^ prev;
    for (int i = 0; i < W; i++) begin
      if (ch[i]) begin
        int unsigned a1, a2, d;
        a1 = (i == 0)     ? 0 : (!ch[i-1] ? 0 : (bus_i[i-1] == bus_i[i] ? 1 : 2));
        a2 = (i == W - 1) ? 0 : (!ch[i+1] ? 0 : (bus_i[i+1] == bus_i[i] ? 1 : 2));
        if (a1 == 0 && a2 == 0) n_quiet++;
        else                    n_coupled++;
        d = delay_ps(bus_i[i], a1, a2);
        if (d > max_delay_ps) max_delay_ps = d;
        fork
          automatic int unsigned j = i;
          automatic logic v = bus_i[i];
          automatic int unsigned dj = d;
          begin
            #(dj * 1ps);
            line[j] = v;
          end
        join_none
      end
    end
    prev = bus_i;
  end

  assign bus_o = line ^ noise_i;

endmodule
