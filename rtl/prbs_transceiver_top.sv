// prbs_transceiver_top: the three transceiver variants on one reference clock.
//
// m1_*: the basic transceiver, patterns PRBS-48, -51, -63, -127, -255, one bit
//       per reference clock cycle (no divider), tx_out looped to the receiver;
//       its ports are those of the basic block diagram: prbs_sel, tx_in,
//       rx_out and the parallel outputs (tx_out brought out as well).
// m2_*: the long-period transceiver, patterns PRBS-48, -51, -63, -127, -255,
//       six divided clocks (20..70-bit counters) behind an 8:1 clock mux.
// m3_*: the multichannel transceiver, patterns PRBS-7, -10, -15, -23, -31, -48,
//       -51, -63, nine divided clocks (20..100-bit counters).
// Each variant has its own selects, serial input, serial outputs, selected
// clock and parallel outputs. The basic variant samples m1_tx_in on every
// clock edge; m1_tx_out follows one cycle later and m1_rx_out two cycles later
// (see prbs_transceiver). For the clocked variants see prbs_uhf_transceiver.
// The counter widths are parameters so that a simulation can use short
// dividers; the defaults are the 20..100-bit counters of the design.
module prbs_transceiver_top
  import prbs_pkg::*;
#(
  parameter int unsigned M2_CNT_W_P [M2_NUM_CLK] = M2_CNT_W,
  parameter int unsigned M3_CNT_W_P [M3_NUM_CLK] = M3_CNT_W
) (
  input  logic                              clk,
  input  logic                              rst,
  // basic variant, full clock rate
  input  logic [prbs_pkg::PRBS_SEL_W-1:0]   m1_prbs_sel,
  input  logic                              m1_tx_in,
  output logic                              m1_tx_out,
  output logic                              m1_rx_out,
  output logic [prbs_pkg::PRBS_PAR_W-1:0]   m1_tx_par,
  output logic [prbs_pkg::PRBS_PAR_W-1:0]   m1_rx_par,
  // long-period variant
  input  logic [$clog2(M2_NUM_CLK_IN)-1:0]  m2_clk_sel,
  input  logic [prbs_pkg::PRBS_SEL_W-1:0]        m2_prbs_sel,
  input  logic                              m2_tx_in,
  output logic                              m2_tx_out,
  output logic                              m2_rx_out,
  output logic                              m2_clk_out,
  output logic                              m2_bit_tick,
  output logic [prbs_pkg::PRBS_PAR_W-1:0]        m2_tx_par,
  output logic [prbs_pkg::PRBS_PAR_W-1:0]        m2_rx_par,
  // multichannel variant
  input  logic [$clog2(M3_NUM_CLK_IN)-1:0]  m3_clk_sel,
  input  logic [prbs_pkg::PRBS_SEL_W-1:0]        m3_prbs_sel,
  input  logic                              m3_tx_in,
  output logic                              m3_tx_out,
  output logic                              m3_rx_out,
  output logic                              m3_clk_out,
  output logic                              m3_bit_tick,
  output logic [prbs_pkg::PRBS_PAR_W-1:0]        m3_tx_par,
  output logic [prbs_pkg::PRBS_PAR_W-1:0]        m3_rx_par
);

  prbs_transceiver #(
    .NUM_CH(M2_NUM_CH), .LEN(M2_LEN), .TAP(M2_TAP), .DEFAULT_CH(M2_DEFAULT_CH)
  ) u_m1 (
    .clk(clk), .rst(rst), .en(1'b1), .prbs_sel(m1_prbs_sel),
    .tx_in(m1_tx_in), .tx_out(m1_tx_out), .rx_in(m1_tx_out), .rx_out(m1_rx_out),
    .tx_par(m1_tx_par), .rx_par(m1_rx_par)
  );

  prbs_uhf_transceiver #(
    .NUM_CH(M2_NUM_CH), .LEN(M2_LEN), .TAP(M2_TAP), .DEFAULT_CH(M2_DEFAULT_CH),
    .NUM_CLK(M2_NUM_CLK), .CNT_W(M2_CNT_W_P), .NUM_CLK_IN(M2_NUM_CLK_IN)
  ) u_m2 (
    .clk(clk), .rst(rst), .clk_sel(m2_clk_sel), .prbs_sel(m2_prbs_sel),
    .tx_in(m2_tx_in), .tx_out(m2_tx_out), .rx_out(m2_rx_out),
    .clk_out(m2_clk_out), .bit_tick(m2_bit_tick), .tx_par(m2_tx_par), .rx_par(m2_rx_par)
  );

  prbs_uhf_transceiver #(
    .NUM_CH(M3_NUM_CH), .LEN(M3_LEN), .TAP(M3_TAP), .DEFAULT_CH(M3_DEFAULT_CH),
    .NUM_CLK(M3_NUM_CLK), .CNT_W(M3_CNT_W_P), .NUM_CLK_IN(M3_NUM_CLK_IN)
  ) u_m3 (
    .clk(clk), .rst(rst), .clk_sel(m3_clk_sel), .prbs_sel(m3_prbs_sel),
    .tx_in(m3_tx_in), .tx_out(m3_tx_out), .rx_out(m3_rx_out),
    .clk_out(m3_clk_out), .bit_tick(m3_bit_tick), .tx_par(m3_tx_par), .rx_par(m3_rx_par)
  );

endmodule
