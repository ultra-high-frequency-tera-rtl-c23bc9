// prbs_mux: channel multiplexer of the transceiver.
//
// Picks one of NUM_CH values of WIDTH bits by sel. A select value outside
// 0..NUM_CH-1 picks DEFAULT_CH, as the pattern select of the document falls back
// to its third pattern. Purely combinational. The transceiver uses it for the
// scrambled serial output and for the serial and parallel outputs of the
// selected channels.
module prbs_mux #(
  parameter int unsigned NUM_CH     = 5,
  parameter int unsigned WIDTH      = 1,
  parameter int unsigned SEL_W      = 4,
  parameter int unsigned DEFAULT_CH = 2
) (
  input  logic [SEL_W-1:0] sel,
  input  logic [WIDTH-1:0] din [NUM_CH],
  output logic [WIDTH-1:0] dout
);

  always_comb begin
    dout = din[DEFAULT_CH];
    for (int unsigned i = 0; i < NUM_CH; i++)
      if (sel == SEL_W'(i)) dout = din[i];
  end

  initial begin
    assert (DEFAULT_CH < NUM_CH) else $error("prbs_mux: DEFAULT_CH out of range");
  end

endmodule
