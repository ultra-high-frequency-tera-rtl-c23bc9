// prbs_transceiver: multichannel PRBS transceiver core.
//
// Transmitter: the serial input tx_in feeds every PRBS-N transmitter channel
// (prbs_tx_channel, one per entry of LEN/TAP); all of them advance on every bit
// strobe, and the PRBS multiplexer puts the scrambled bit of the channel chosen
// by prbs_sel on tx_out. Receiver: the PRBS de-multiplexer hands rx_in and the
// strobe to the receiver channel chosen by the same prbs_sel; only that channel
// advances, and its recovered bit is rx_out. The parallel outputs carry the low
// PAR_W bits of the selected transmitter and receiver registers (zero-extended
// for channels shorter than PAR_W; the bits of longer registers above PAR_W
// are not brought out).
//
// Timing, with rx_in wired to tx_out: tx_in is sampled on strobe k, tx_out
// carries its scrambled bit after strobe k, and rx_out carries the recovered bit
// after strobe k+1. After prbs_sel changes, the newly selected receiver channel
// needs at most N strobes to resynchronise (self-synchronising scrambling).
// Out-of-range prbs_sel values select DEFAULT_CH on both sides.
//
// Structure, channel lengths and the shared select follow the document; the
// clock enable, the output multiplexer on the receiver side and holding the
// unselected receivers are this design's choices.
module prbs_transceiver
  import prbs_pkg::*;
#(
  parameter int unsigned NUM_CH          = M2_NUM_CH,
  parameter int unsigned LEN [NUM_CH]    = M2_LEN,
  parameter int unsigned TAP [NUM_CH]    = M2_TAP,
  parameter int unsigned PAR_W           = prbs_pkg::PRBS_PAR_W,
  parameter int unsigned SEL_W           = prbs_pkg::PRBS_SEL_W,
  parameter int unsigned DEFAULT_CH      = M2_DEFAULT_CH
) (
  input  logic             clk,
  input  logic             rst,
  input  logic             en,
  input  logic [SEL_W-1:0] prbs_sel,
  input  logic             tx_in,
  output logic             tx_out,
  input  logic             rx_in,
  output logic             rx_out,
  output logic [PAR_W-1:0] tx_par,
  output logic [PAR_W-1:0] rx_par
);

  logic             tx_ser [NUM_CH];
  logic             rx_ser [NUM_CH];
  logic [PAR_W-1:0] tx_pw  [NUM_CH];
  logic [PAR_W-1:0] rx_pw  [NUM_CH];
  logic [NUM_CH-1:0] rx_en, rx_bit;

  prbs_demux #(.NUM_CH(NUM_CH), .SEL_W(SEL_W), .DEFAULT_CH(DEFAULT_CH)) u_demux (
    .sel(prbs_sel), .en(en), .din(rx_in), .ch_en(rx_en), .ch_bit(rx_bit)
  );

  for (genvar g = 0; g < NUM_CH; g++) begin : g_ch
    localparam int unsigned N = LEN[g];
    logic [N-1:0] tpar, rpar;

    prbs_tx_channel #(.N(N), .TAP(TAP[g])) u_tx (
      .clk(clk), .rst(rst), .en(en), .tx_in(tx_in), .tx_out(tx_ser[g]), .par(tpar)
    );
    prbs_rx_channel #(.N(N), .TAP(TAP[g])) u_rx (
      .clk(clk), .rst(rst), .en(rx_en[g]), .rx_in(rx_bit[g]), .rx_out(rx_ser[g]), .par(rpar)
    );

    if (N >= PAR_W) begin : g_trunc
      assign tx_pw[g] = tpar[PAR_W-1:0];
      assign rx_pw[g] = rpar[PAR_W-1:0];
    end else begin : g_ext
      assign tx_pw[g] = {{(PAR_W-N){1'b0}}, tpar};
      assign rx_pw[g] = {{(PAR_W-N){1'b0}}, rpar};
    end
  end

  prbs_mux #(.NUM_CH(NUM_CH), .WIDTH(1), .SEL_W(SEL_W), .DEFAULT_CH(DEFAULT_CH)) u_tx_mux (
    .sel(prbs_sel), .din(tx_ser), .dout(tx_out)
  );
  prbs_mux #(.NUM_CH(NUM_CH), .WIDTH(1), .SEL_W(SEL_W), .DEFAULT_CH(DEFAULT_CH)) u_rx_mux (
    .sel(prbs_sel), .din(rx_ser), .dout(rx_out)
  );
  prbs_mux #(.NUM_CH(NUM_CH), .WIDTH(PAR_W), .SEL_W(SEL_W), .DEFAULT_CH(DEFAULT_CH)) u_tpar_mux (
    .sel(prbs_sel), .din(tx_pw), .dout(tx_par)
  );
  prbs_mux #(.NUM_CH(NUM_CH), .WIDTH(PAR_W), .SEL_W(SEL_W), .DEFAULT_CH(DEFAULT_CH)) u_rpar_mux (
    .sel(prbs_sel), .din(rx_pw), .dout(rx_par)
  );

  // Exactly one receiver channel advances per strobe.
  a_one_rx: assert property (@(posedge clk) disable iff (rst) en |-> $onehot(rx_en));

endmodule
