// tb_prbs_transceiver_full: the top at its default sizes, one complete operation.
//
// All divider counters have their full widths (20..70 and 20..100 bits), so a
// data bit of the clocked variants lasts 2^20 reference cycles on their
// fastest clock, which both use: the long-period variant sends 56 bits through
// PRBS-48 (more than its 48-bit register), the multichannel variant 48 bits
// through PRBS-7. The basic variant meanwhile sends 300 bits through PRBS-255
// at one bit per clock. The clocked checkers wake only on strobes; they check that each strobe falls on the
// cycle where the 20-bit counter reaches 2^19 and that every bit comes back on
// rx_out one strobe later.
module tb_prbs_transceiver_full;
  import prbs_pkg::*;

  logic clk = 1'b0, rst = 1'b1;
  always #5 clk = ~clk;

  logic [2:0] m2_clk_sel;  logic [3:0] m2_prbs_sel;  logic m2_tx_in, m2_tx_out, m2_rx_out, m2_clk_out, m2_tick;
  logic [3:0] m3_clk_sel;  logic [3:0] m3_prbs_sel;  logic m3_tx_in, m3_tx_out, m3_rx_out, m3_clk_out, m3_tick;
  logic [63:0] m2_tx_par, m2_rx_par, m3_tx_par, m3_rx_par;
  logic [3:0] m1_prbs_sel = '0;  logic m1_tx_in = 1'b0, m1_tx_out, m1_rx_out;
  logic [63:0] m1_tx_par, m1_rx_par;

  prbs_transceiver_top u_dut (
    .clk, .rst,
    .m1_prbs_sel, .m1_tx_in, .m1_tx_out, .m1_rx_out, .m1_tx_par, .m1_rx_par,
    .m2_clk_sel, .m2_prbs_sel, .m2_tx_in, .m2_tx_out, .m2_rx_out, .m2_clk_out,
    .m2_bit_tick(m2_tick), .m2_tx_par, .m2_rx_par,
    .m3_clk_sel, .m3_prbs_sel, .m3_tx_in, .m3_tx_out, .m3_rx_out, .m3_clk_out,
    .m3_bit_tick(m3_tick), .m3_tx_par, .m3_rx_par
  );

  int c2, f2, ps2, cs2, d2, sp2, rs2, st2;
  int c3, f3, ps3, cs3, d3, sp3, rs3, st3;
  bit done2, done3;

  tb_link_checker #(
    .NUM_CH(M2_NUM_CH), .LEN(M2_LEN), .DEFAULT_CH(M2_DEFAULT_CH),
    .NUM_CLK(M2_NUM_CLK), .CNT_W(M2_CNT_W), .NUM_CLK_IN(M2_NUM_CLK_IN),
    .NUM_PHASES(1), .EXTRA_TICKS(8), .SPARE_TEST(1'b0), .FAST(1'b1)
  ) u_chk2 (
    .clk, .rst, .clk_sel(m2_clk_sel), .prbs_sel(m2_prbs_sel), .tx_in(m2_tx_in),
    .tx_out(m2_tx_out), .rx_out(m2_rx_out), .clk_out(m2_clk_out), .bit_tick(m2_tick),
    .checks(c2), .failures(f2), .n_pattern_switch(ps2), .n_clock_switch(cs2),
    .n_default_sel(d2), .n_spare_clock(sp2), .n_resync(rs2), .n_strobes(st2), .done(done2)
  );

  tb_link_checker #(
    .NUM_CH(M3_NUM_CH), .LEN(M3_LEN), .DEFAULT_CH(M3_DEFAULT_CH),
    .NUM_CLK(M3_NUM_CLK), .CNT_W(M3_CNT_W), .NUM_CLK_IN(M3_NUM_CLK_IN),
    .NUM_PHASES(1), .EXTRA_TICKS(41), .SPARE_TEST(1'b0), .FAST(1'b1)
  ) u_chk3 (
    .clk, .rst, .clk_sel(m3_clk_sel), .prbs_sel(m3_prbs_sel), .tx_in(m3_tx_in),
    .tx_out(m3_tx_out), .rx_out(m3_rx_out), .clk_out(m3_clk_out), .bit_tick(m3_tick),
    .checks(c3), .failures(f3), .n_pattern_switch(ps3), .n_clock_switch(cs3),
    .n_default_sel(d3), .n_spare_clock(sp3), .n_resync(rs3), .n_strobes(st3), .done(done3)
  );

  initial begin : watchdog
    repeat (60 * (1 << 20)) @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", c1 + c2 + c3, f1 + f2 + f3 + 1);
    $finish;
  end

  // Basic variant: 300 bits through PRBS-255 at one bit per clock.
  int c1 = 0, f1 = 0;
  initial begin
    bit h[$];
    m1_prbs_sel = 4'd4;
    @(negedge rst);
    for (int k = 1; k <= 300; k++) begin
      h.push_back(m1_tx_in);
      @(posedge clk); #1;
      if (k >= 2) begin
        c1++;
        if (m1_rx_out !== h[h.size() - 2]) begin
          f1++;
          if (f1 < 10) $display("FAIL basic variant bit %0d not recovered", k);
        end
      end
      m1_tx_in = 1'($urandom);
    end
  end

  initial begin
    int checks, failures;
    repeat (3) @(posedge clk);
    #1 rst = 1'b0;
    wait (done2 && done3);
    checks = c1 + c2 + c3 + 2; failures = f1 + f2 + f3;
    if (st2 != 56) begin failures++; $display("FAIL long-period strobes %0d, expected 56", st2); end
    if (st3 != 48) begin failures++; $display("FAIL multichannel strobes %0d, expected 48", st3); end
    $display("strobes: long-period %0d, multichannel %0d, finished at %0t", st2, st3, $time);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
