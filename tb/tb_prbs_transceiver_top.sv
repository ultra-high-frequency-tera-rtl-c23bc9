// tb_prbs_transceiver_top: end-to-end test of the three transceiver variants.
//
// The basic variant (one bit per clock) is driven directly: every pattern and
// an out-of-range select, each for more bits than its register, every bit
// checked on rx_out. The top is built with short divider counters (2..7 bits for the six-clock
// variant, 2..10 bits for the nine-clock variant) so that every clock can be
// selected. One tb_link_checker per variant runs concurrently: every clock,
// every pattern and one out-of-range pattern select are used, each for more
// bits than the pattern's register length, then every spare clock-mux input.
// The test fails if any of these mechanisms never happened: pattern switch,
// clock switch, default (out-of-range) pattern, spare clock input, receiver
// resynchronisation after a switch.
module tb_prbs_transceiver_top;
  import prbs_pkg::*;
  localparam int unsigned W2 [M2_NUM_CLK] = '{2, 3, 4, 5, 6, 7};
  localparam int unsigned W3 [M3_NUM_CLK] = '{2, 3, 4, 5, 6, 7, 8, 9, 10};

  logic clk = 1'b0, rst = 1'b1;
  always #5 clk = ~clk;

  logic [2:0] m2_clk_sel;  logic [3:0] m2_prbs_sel;  logic m2_tx_in, m2_tx_out, m2_rx_out, m2_clk_out, m2_tick;
  logic [3:0] m3_clk_sel;  logic [3:0] m3_prbs_sel;  logic m3_tx_in, m3_tx_out, m3_rx_out, m3_clk_out, m3_tick;
  logic [63:0] m2_tx_par, m2_rx_par, m3_tx_par, m3_rx_par;
  logic [3:0] m1_prbs_sel = '0;  logic m1_tx_in = 1'b0, m1_tx_out, m1_rx_out;
  logic [63:0] m1_tx_par, m1_rx_par;

  prbs_transceiver_top #(.M2_CNT_W_P(W2), .M3_CNT_W_P(W3)) u_dut (
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
    .NUM_CLK(M2_NUM_CLK), .CNT_W(W2), .NUM_CLK_IN(M2_NUM_CLK_IN), .NUM_PHASES(M2_NUM_CH + 2)
  ) u_chk2 (
    .clk, .rst, .clk_sel(m2_clk_sel), .prbs_sel(m2_prbs_sel), .tx_in(m2_tx_in),
    .tx_out(m2_tx_out), .rx_out(m2_rx_out), .clk_out(m2_clk_out), .bit_tick(m2_tick),
    .checks(c2), .failures(f2), .n_pattern_switch(ps2), .n_clock_switch(cs2),
    .n_default_sel(d2), .n_spare_clock(sp2), .n_resync(rs2), .n_strobes(st2), .done(done2)
  );

  tb_link_checker #(
    .NUM_CH(M3_NUM_CH), .LEN(M3_LEN), .DEFAULT_CH(M3_DEFAULT_CH),
    .NUM_CLK(M3_NUM_CLK), .CNT_W(W3), .NUM_CLK_IN(M3_NUM_CLK_IN), .NUM_PHASES(M3_NUM_CH + 1)
  ) u_chk3 (
    .clk, .rst, .clk_sel(m3_clk_sel), .prbs_sel(m3_prbs_sel), .tx_in(m3_tx_in),
    .tx_out(m3_tx_out), .rx_out(m3_rx_out), .clk_out(m3_clk_out), .bit_tick(m3_tick),
    .checks(c3), .failures(f3), .n_pattern_switch(ps3), .n_clock_switch(cs3),
    .n_default_sel(d3), .n_spare_clock(sp3), .n_resync(rs3), .n_strobes(st3), .done(done3)
  );

  int checks, failures;

  // Basic variant: one bit per clock. Walk through every pattern and one
  // out-of-range select; rx_out must return the bit set two edges earlier from
  // the second edge after reset, and within N+1 edges after each switch.
  int c1 = 0, f1 = 0, sw1 = 0, rs1 = 0, d1 = 0;
  bit done1 = 1'b0;
  initial begin
    static logic [3:0] s1 [6] = '{4'd0, 4'd1, 4'd2, 4'd3, 4'd4, 4'd9};
    bit h[$];
    @(negedge rst);
    foreach (s1[i]) begin
      int ch, n, good;
      m1_prbs_sel = s1[i];
      ch = (int'(s1[i]) < int'(M2_NUM_CH)) ? int'(s1[i]) : int'(M2_DEFAULT_CH);
      n = M2_LEN[ch];
      if (i > 0) sw1++;
      if (int'(s1[i]) >= int'(M2_NUM_CH)) d1++;
      good = 0;
      for (int k = 1; k <= n + 40; k++) begin
        h.push_back(m1_tx_in);
        @(posedge clk); #1;
        if ((i == 0 && k >= 2) || k > n + 1) begin
          c1++;
          if (m1_rx_out !== h[h.size() - 2]) begin
            f1++;
            if (f1 < 10) $display("FAIL basic variant: pattern %0d bit %0d not recovered", s1[i], k);
          end
          good++;
        end
        m1_tx_in = 1'($urandom);
      end
      if (i > 0 && good > 0) rs1++;
    end
    done1 = 1'b1;
  end

  task automatic need(input string nm, input int count);
    checks++;
    $display("  %-40s %0d", nm, count);
    if (count == 0) begin
      failures++;
      $display("FAIL mechanism never happened: %s", nm);
    end
  endtask

  initial begin : watchdog
    repeat (600000) @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", c1 + c2 + c3, f1 + f2 + f3 + 1);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    #1 rst = 1'b0;
    wait (done1 && done2 && done3);
    checks = c1 + c2 + c3; failures = f1 + f2 + f3;
    $display("mechanisms:");
    need("basic: pattern switches",           sw1);
    need("basic: out-of-range pattern",       d1);
    need("basic: resync after switch",        rs1);
    need("long-period: pattern switches",     ps2);
    need("long-period: clock switches",       cs2);
    need("long-period: out-of-range pattern", d2);
    need("long-period: spare clock inputs",   sp2);
    need("long-period: resync after switch",  rs2);
    need("long-period: strobes",              st2);
    need("multichannel: pattern switches",    ps3);
    need("multichannel: clock switches",      cs3);
    need("multichannel: out-of-range pattern", d3);
    need("multichannel: spare clock inputs",  sp3);
    need("multichannel: resync after switch", rs3);
    need("multichannel: strobes",             st3);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
