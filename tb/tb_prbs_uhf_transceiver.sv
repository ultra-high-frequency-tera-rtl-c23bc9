// tb_prbs_uhf_transceiver: end-to-end test of the clocked transceiver.
//
// The long-period configuration (channels 48, 51, 63, 127, 255) with short
// divider counters (2..7 bits instead of 20..70) so that every clock can be
// exercised. The test follows the reference cycle count itself and checks:
//   * clk_out equals bit W-1 of the cycle count for the selected clock, and
//     strobes (bit_tick) come exactly 2^W cycles apart;
//   * the two spare clock-mux inputs give no strobe at all;
//   * rx_out returns the bit sent one strobe earlier, on every strobe after
//     the receiver has seen N+1 strobes on a newly selected channel, and from
//     the second strobe after reset (both sides start from the same seed);
//   * tx_out does not move between strobes.
module tb_prbs_uhf_transceiver;
  import prbs_pkg::*;
  localparam int unsigned CW [M2_NUM_CLK] = '{2, 3, 4, 5, 6, 7};

  logic clk = 1'b0, rst = 1'b1, tx_in = 1'b0;
  logic [2:0] clk_sel = '0;
  logic [3:0] prbs_sel = '0;
  logic tx_out, rx_out, clk_out, bit_tick;
  logic [63:0] tx_par, rx_par;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  prbs_uhf_transceiver #(.CNT_W(CW)) u_dut (
    .clk, .rst, .clk_sel, .prbs_sel, .tx_in, .tx_out, .rx_out, .clk_out, .bit_tick, .tx_par, .rx_par
  );

  longint unsigned cyc;
  bit sent[$];
  int ticks_total = 0, switches = 0, spare_quiet = 0;

  task automatic chk(input string nm, input bit ok);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s at cycle %0d", nm, cyc);
    end
  endtask

  // Run one phase: nt strobes with the given selects. first: start of test.
  task automatic phase(input int cs, input int ps, input int nt, input bit first);
    int ch, n, since, last_tick;
    bit pending;
    logic t0;
    clk_sel = 3'(cs); prbs_sel = 4'(ps);
    #1;
    ch = (ps < M2_NUM_CH) ? ps : M2_DEFAULT_CH;
    n = M2_LEN[ch];
    since = 0; last_tick = -1; pending = 1'b0;
    if (!first) switches++;
    while (since < nt) begin
      t0 = tx_out;
      @(posedge clk); #1;
      cyc++;
      if (pending) begin
        // a strobe was taken at this edge
        pending = 1'b0;
        since++;
        if ((first && since >= 2) || since > n + 1)
          chk($sformatf("rx_out recovers data (clk %0d, ch %0d)", cs, ch), rx_out === sent[sent.size() - 2]);
        tx_in = 1'($urandom);
      end else begin
        chk("tx_out stable between strobes", tx_out === t0);
      end
      chk("clk_out level", clk_out === 1'(cyc >> (CW[cs] - 1)));
      if (bit_tick) begin
        if (last_tick >= 0) chk("strobe interval", (int'(cyc) - last_tick) == (1 << CW[cs]));
        last_tick = int'(cyc);
        sent.push_back(tx_in);
        pending = 1'b1;
        ticks_total++;
      end
    end
    // let the last strobe complete
    @(posedge clk); #1; cyc++;
  endtask

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    #1 rst = 1'b0;
    cyc = 0;
    phase(0, 0, 80, 1'b1);
    phase(1, 1, 80, 1'b0);
    phase(2, 2, 90, 1'b0);
    phase(3, 3, 150, 1'b0);
    phase(0, 4, 280, 1'b0);
    phase(5, 9, 80, 1'b0);
    phase(4, 2, 70, 1'b0);
    // spare clock-mux inputs: no strobes, link frozen
    for (int s = 6; s < 8; s++) begin
      logic [63:0] tp;
      clk_sel = 3'(s);
      #1 tp = tx_par;
      for (int k = 0; k < 300; k++) begin
        @(posedge clk); #1; cyc++;
        chk("spare input: no strobe", bit_tick === 1'b0 && clk_out === 1'b0);
        tx_in = 1'($urandom);
      end
      chk("spare input: link frozen", tx_par === tp);
      spare_quiet++;
    end
    chk("every clock and pattern used", switches == 6 && spare_quiet == 2);
    $display("strobes=%0d switches=%0d", ticks_total, switches);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
