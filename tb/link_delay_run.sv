// link_delay_run: testbench helper. Runs one full-size link through the
// timed wire model at a nominal clock period of PERIOD_PS, sends N random
// words and checks each one four cycles later, with no error flag raised.
// It reports the longest wire delay seen. done goes high at the end;
// checks and failures count what was compared.
module link_delay_run
  import skew_pkg::*;
#(
  parameter bit          LONG_10   = 1'b0,
  parameter int unsigned PERIOD_PS = 1000,
  parameter int          N         = 2000
) (
  output logic done,
  output int   checks,
  output int   failures,
  output int   max_delay_ps
);

  logic clk = 1'b0, rst_n = 1'b0;
  logic [DATA_W-1:0] din, dout;
  logic [BUS_W-1:0]  bus_tx, bus_rx;
  logic              txc, terr, perr, retx;
  logic [DATA_W-1:0] sent [0:N-1];

  skew_link_top dut (
    .clk(clk), .rst_n(rst_n), .data_i(din),
    .bus_o(bus_tx), .tx_clk_o(txc),
    .bus_i(bus_rx), .tx_clk_i(txc),
    .data_o(dout), .temporal_err_o(terr), .parity_err_o(perr), .retx_o(retx)
  );

  bus_wire_model #(.W(BUS_W), .LONG_10(LONG_10)) u_wires (
    .bus_i(bus_tx), .noise_i('0), .bus_o(bus_rx));

  always #((PERIOD_PS / 2) * 1ps) clk = ~clk;

  assign max_delay_ps = int'(u_wires.max_delay_ps);

  initial begin
    done     = 1'b0;
    checks   = 0;
    failures = 0;
    din      = '0;
    repeat (2) @(negedge clk);
    u_wires.max_delay_ps = 0;
    rst_n = 1'b1;
    for (int k = 0; k < N + 5; k++) begin
      if (k < N) begin
        sent[k] = $urandom;
        din     = sent[k];
      end
      @(posedge clk);
      @(negedge clk);
      if (k >= 4 && k - 4 < N) begin
        checks += 2;
        if (dout != sent[k-4]) begin
          failures++;
          $display("FAIL %0d ps period: word %0d", PERIOD_PS, k - 4);
        end
        if (retx) begin
          failures++;
          $display("FAIL %0d ps period: false error on word %0d", PERIOD_PS, k - 4);
        end
      end
    end
    done = 1'b1;
  end

endmodule
