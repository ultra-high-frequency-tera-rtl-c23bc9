// clk_sel_mux: clock frequency selector.
//
// An NUM_IN:1 multiplexer over the divided clocks of clk_freq_gen. Inputs
// NUM_CLK..NUM_IN-1 are spare and tied low (the six-clock variant drives an 8:1
// mux with two grounded inputs); selecting one stops the link. Next to the
// selected clock level (clk_out) it passes that clock's rising-edge pulse as
// tick, the bit strobe on which transmitter and receiver advance.
//
// The whole transceiver stays on the reference clock and uses tick as a clock
// enable instead of clocking flip-flops from the multiplexed clock: this is a
// choice of this design, so that there is one clock domain and switching the
// selection cannot glitch a clock. Purely combinational.
module clk_sel_mux #(
  parameter int unsigned NUM_IN  = 8,
  parameter int unsigned NUM_CLK = 6,
  parameter int unsigned SEL_W   = $clog2(NUM_IN)
) (
  input  logic [SEL_W-1:0]   clk_sel,
  input  logic [NUM_CLK-1:0] clk_in,
  input  logic [NUM_CLK-1:0] rise_in,
  output logic               clk_out,
  output logic               tick
);

  logic [NUM_IN-1:0] clk_all, rise_all;

  assign clk_all  = NUM_IN'(clk_in);
  assign rise_all = NUM_IN'(rise_in);

  always_comb begin
    clk_out = 1'b0;
    tick    = 1'b0;
    if (32'(clk_sel) < NUM_IN) begin
      clk_out = clk_all[clk_sel];
      tick    = rise_all[clk_sel];
    end
  end

  initial begin
    assert (NUM_CLK <= NUM_IN) else $error("clk_sel_mux: more clocks than mux inputs");
  end

endmodule
