// clk_freq_gen: clock frequency generator of the transceiver.
//
// One free-running binary counter per output clock, CNT_W[i] bits wide, all on
// the main reference clock. Output clock i is the counter's most significant
// bit: it toggles every 2^(CNT_W[i]-1) reference cycles, so its period is
// 2^CNT_W[i] cycles. The document builds its named clocks (MHz, GHz, THz, PHz,
// EHz, ZHz, YHz, XHz, WHz) from counters of 20, 30, ... 100 bits in exactly
// this way; those widths are the defaults (first six for the six-clock
// variant).
//
// Interface and timing: clk_div[i] is a registered level. rise[i] is high for
// exactly one reference cycle, the first cycle in which clk_div[i] is high
// (counter value 2^(W-1)); it is decoded from the counter, so it costs no
// extra register. rst is synchronous and clears every counter (a choice of this
// design).
module clk_freq_gen #(
  parameter int unsigned NUM_CLK = 6,
  parameter int unsigned CNT_W [NUM_CLK] = '{20, 30, 40, 50, 60, 70}
) (
  input  logic               clk,
  input  logic               rst,
  output logic [NUM_CLK-1:0] clk_div,
  output logic [NUM_CLK-1:0] rise
);

  for (genvar g = 0; g < NUM_CLK; g++) begin : g_div
    localparam int unsigned W = CNT_W[g];
    logic [W-1:0] cnt;

    always_ff @(posedge clk) begin
      if (rst) cnt <= '0;
      else     cnt <= cnt + W'(1);
    end

    assign clk_div[g] = cnt[W-1];
    assign rise[g]    = (cnt == {1'b1, {(W-1){1'b0}}});

    initial begin
      assert (W >= 2) else $error("clk_freq_gen: counter width must be at least 2");
    end
  end

endmodule
