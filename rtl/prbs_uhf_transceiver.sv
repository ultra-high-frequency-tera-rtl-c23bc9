// prbs_uhf_transceiver: PRBS transceiver synchronised to a selectable clock.
//
// The clock frequency generator (clk_freq_gen) divides the reference clock by
// 2^CNT_W[i] for each named clock; the clock selector (clk_sel_mux) picks one
// by clk_sel, and its rising edge is the bit strobe of the multichannel
// transceiver core (prbs_transceiver). The core's scrambled output tx_out is
// looped back to its receiver, as in the block diagrams, so rx_out returns the
// baseband input.
//
// The defaults are the long-period variant: channels 48, 51, 63, 127, 255 and
// six clocks (counters of 20..70 bits) into an 8:1 clock mux. With the
// prbs_pkg M3_* tables it is the multichannel variant: channels 7..63 and nine
// clocks (20..100 bits).
//
// Timing: one data bit per period of the selected clock. tx_in is sampled in
// the reference cycle in which the selected clock rises (bit_tick high) and
// should be held for the whole period; tx_out follows one reference cycle after
// that strobe and rx_out one clock period later. Everything is on clk; rst is
// synchronous and active high.
module prbs_uhf_transceiver
  import prbs_pkg::*;
#(
  parameter int unsigned NUM_CH            = M2_NUM_CH,
  parameter int unsigned LEN [NUM_CH]      = M2_LEN,
  parameter int unsigned TAP [NUM_CH]      = M2_TAP,
  parameter int unsigned DEFAULT_CH        = M2_DEFAULT_CH,
  parameter int unsigned NUM_CLK           = M2_NUM_CLK,
  parameter int unsigned CNT_W [NUM_CLK]   = M2_CNT_W,
  parameter int unsigned NUM_CLK_IN        = M2_NUM_CLK_IN,
  parameter int unsigned CLK_SEL_W         = $clog2(NUM_CLK_IN)
) (
  input  logic                       clk,
  input  logic                       rst,
  input  logic [CLK_SEL_W-1:0]       clk_sel,
  input  logic [prbs_pkg::PRBS_SEL_W-1:0] prbs_sel,
  input  logic                       tx_in,
  output logic                       tx_out,
  output logic                       rx_out,
  output logic                       clk_out,
  output logic                       bit_tick,
  output logic [prbs_pkg::PRBS_PAR_W-1:0] tx_par,
  output logic [prbs_pkg::PRBS_PAR_W-1:0] rx_par
);

  logic [NUM_CLK-1:0] clk_div, clk_rise;

  clk_freq_gen #(.NUM_CLK(NUM_CLK), .CNT_W(CNT_W)) u_clkgen (
    .clk(clk), .rst(rst), .clk_div(clk_div), .rise(clk_rise)
  );

  clk_sel_mux #(.NUM_IN(NUM_CLK_IN), .NUM_CLK(NUM_CLK), .SEL_W(CLK_SEL_W)) u_clksel (
    .clk_sel(clk_sel), .clk_in(clk_div), .rise_in(clk_rise),
    .clk_out(clk_out), .tick(bit_tick)
  );

  prbs_transceiver #(
    .NUM_CH(NUM_CH), .LEN(LEN), .TAP(TAP), .DEFAULT_CH(DEFAULT_CH)
  ) u_core (
    .clk(clk), .rst(rst), .en(bit_tick), .prbs_sel(prbs_sel),
    .tx_in(tx_in), .tx_out(tx_out), .rx_in(tx_out), .rx_out(rx_out),
    .tx_par(tx_par), .rx_par(rx_par)
  );

endmodule
