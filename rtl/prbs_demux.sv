// prbs_demux: receiver de-multiplexer of the transceiver.
//
// Hands the received serial bit and the bit strobe to the receiver channel
// chosen by sel (DEFAULT_CH when sel is out of range, as in prbs_mux). The other
// channels see no strobe and a low data bit, so they hold their registers.
// Purely combinational; ch_en is one-hot when en is high, zero otherwise.
module prbs_demux #(
  parameter int unsigned NUM_CH     = 5,
  parameter int unsigned SEL_W      = 4,
  parameter int unsigned DEFAULT_CH = 2
) (
  input  logic [SEL_W-1:0]  sel,
  input  logic              en,
  input  logic              din,
  output logic [NUM_CH-1:0] ch_en,
  output logic [NUM_CH-1:0] ch_bit
);

  logic [NUM_CH-1:0] hit;

  always_comb begin
    hit = '0;
    for (int unsigned i = 0; i < NUM_CH; i++)
      if (sel == SEL_W'(i)) hit[i] = 1'b1;
    if (hit == '0) hit[DEFAULT_CH] = 1'b1;
    ch_en  = en  ? hit : '0;
    ch_bit = din ? hit : '0;
  end

  initial begin
    assert (DEFAULT_CH < NUM_CH) else $error("prbs_demux: DEFAULT_CH out of range");
  end

endmodule
