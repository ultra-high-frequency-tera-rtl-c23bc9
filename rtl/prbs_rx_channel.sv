// prbs_rx_channel: receiver side of one PRBS-N channel.
//
// The self-synchronising descrambler matching prbs_tx_channel. On every bit
// strobe the received bit is shifted into an N-stage register, and the
// recovered bit  rx_in ^ reg[N-1] ^ reg[TAP-1]  is registered to rx_out. Since
// the register holds the last N received bits, the output equals the
// transmitter's input as soon as N bits of one stream have been received,
// whatever the register held before. The link between the two registers
// delays by one bit, so the receiver matches a transmitter reset to 1 when it
// starts from all zeros (the transmitter's reset value shifted by one); that is
// the default SEED, and with it the link is correct from the first bit.
//
// Interface and timing: rx_out changes one clock after a strobe and holds until
// the next; par is the register (the last N received bits, newest in bit 0).
// rst is synchronous, active high, loads SEED into the register and clears
// rx_out.
//
// The document says the receiver restores the baseband signal with the same
// PRBS pattern; this inverse-of-the-transmitter structure and the output
// register are this design's own.
module prbs_rx_channel #(
  parameter int unsigned N    = 48,
  parameter int unsigned TAP  = 47,
  parameter logic [N-1:0] SEED = '0
) (
  input  logic         clk,
  input  logic         rst,
  input  logic         en,
  input  logic         rx_in,
  output logic         rx_out,
  output logic [N-1:0] par
);

  logic [N-1:0] sr;

  always_ff @(posedge clk) begin
    if (rst) begin
      sr     <= SEED;
      rx_out <= 1'b0;
    end else if (en) begin
      sr     <= {sr[N-2:0], rx_in};
      rx_out <= rx_in ^ sr[N-1] ^ sr[TAP-1];
    end
  end

  assign par = sr;

  initial begin
    assert (TAP >= 1 && TAP < N) else $error("prbs_rx_channel: TAP must be in 1..N-1");
  end

endmodule
