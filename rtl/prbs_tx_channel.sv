// prbs_tx_channel: transmitter side of one PRBS-N channel.
//
// An N-stage shift register with feedback polynomial x^N + x^TAP + 1. On every
// bit strobe (en) the feedback bit  fb = reg[N-1] ^ reg[TAP-1] ^ tx_in  is
// shifted into bit 0. The channel is therefore a self-synchronising
// (multiplicative) scrambler: the baseband bit tx_in is spread by the PRBS, and
// with tx_in held low it is a free-running Fibonacci LFSR that repeats every
// 2^N-1 bits when the polynomial is primitive.
//
// Interface and timing: tx_out is reg[0], the bit shifted in at the last strobe,
// so it is valid one clock after the strobe and holds until the next one. par is
// the whole register. rst is synchronous, active high, and loads SEED.
//
// The feedback structure (taps, XOR of the input into the feedback, output taken
// from the newest stage) follows the document; the clock enable, the reset value
// and the register orientation are choices of this design.
module prbs_tx_channel #(
  parameter int unsigned N    = 48,
  parameter int unsigned TAP  = 47,
  parameter logic [N-1:0] SEED = N'(1)
) (
  input  logic         clk,
  input  logic         rst,
  input  logic         en,
  input  logic         tx_in,
  output logic         tx_out,
  output logic [N-1:0] par
);

  logic [N-1:0] sr;
  logic         fb;

  assign fb = sr[N-1] ^ sr[TAP-1] ^ tx_in;

  always_ff @(posedge clk) begin
    if (rst)     sr <= SEED;
    else if (en) sr <= {sr[N-2:0], fb};
  end

  assign tx_out = sr[0];
  assign par    = sr;

  initial begin
    assert (TAP >= 1 && TAP < N) else $error("prbs_tx_channel: TAP must be in 1..N-1");
  end

endmodule
