// prbs_pkg: constants shared by the PRBS transceiver.
//
// The channel tables give, for each PRBS-N channel, the shift-register length N
// and the second feedback tap T of the polynomial x^N + x^T + 1 (taps counted
// as stage numbers, 1..N). Two channel sets exist:
//   * the long-period set 48, 51, 63, 127, 255 (the main transceiver), with the
//     polynomials x^N + x^(N-1) + 1 of the pattern table;
//   * the multichannel set 7, 10, 15, 23, 31, 48, 51, 63 (the nine-clock
//     variant). For 7..31 the usual ITU-T O.150 style polynomials are used
//     (x^7+x^6+1, x^10+x^7+1, x^15+x^14+1, x^23+x^18+1, x^31+x^28+1); those
//     five are a choice of this design, the document gives no taps for them.
// The clock tables give the widths of the divider counters: 20, 30, ... 100
// bits, one counter per named clock (MHz, GHz, THz, PHz, EHz, ZHz, YHz, XHz,
// WHz). The divided clock is the counter MSB, so it toggles every 2^(W-1)
// reference cycles.
package prbs_pkg;

  // Widths of the serial select and the parallel outputs.
  localparam int unsigned PRBS_SEL_W = 4;  // prbs_sel[3:0]
  localparam int unsigned PRBS_PAR_W = 64; // tx[63:0], rx[63:0]

  // Long-period channel set (main transceiver).
  localparam int unsigned M2_NUM_CH = 5;
  localparam int unsigned M2_LEN [M2_NUM_CH] = '{48, 51, 63, 127, 255};
  localparam int unsigned M2_TAP [M2_NUM_CH] = '{47, 50, 62, 126, 254};
  // Channel used when prbs_sel is out of range (the third pattern).
  localparam int unsigned M2_DEFAULT_CH = 2;

  // Multichannel set (nine-clock variant).
  localparam int unsigned M3_NUM_CH = 8;
  localparam int unsigned M3_LEN [M3_NUM_CH] = '{7, 10, 15, 23, 31, 48, 51, 63};
  localparam int unsigned M3_TAP [M3_NUM_CH] = '{6, 7, 14, 18, 28, 47, 50, 62};
  localparam int unsigned M3_DEFAULT_CH = 2;

  // Divider counter widths.
  localparam int unsigned M2_NUM_CLK = 6;   // Mega .. Zetta
  localparam int unsigned M2_CNT_W [M2_NUM_CLK] = '{20, 30, 40, 50, 60, 70};
  localparam int unsigned M2_NUM_CLK_IN = 8; // 8:1 clock mux, spare inputs low

  localparam int unsigned M3_NUM_CLK = 9;   // MHz .. WHz
  localparam int unsigned M3_CNT_W [M3_NUM_CLK] = '{20, 30, 40, 50, 60, 70, 80, 90, 100};
  localparam int unsigned M3_NUM_CLK_IN = 16; // nine clocks need a 4-bit select

endpackage
