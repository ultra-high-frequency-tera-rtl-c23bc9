// tb_prbs_sel_sweep: the pattern-sweep simulation of the basic transceiver.
//
// Reproduces the published simulation run: a 10 ns clock for 70 cycles, a
// reset pulse, and prbs_sel stepping 0, 1, 2, 3, 4 every 5 clock cycles (then
// staying at 4), with one new input bit per clock. The core runs at one bit
// per clock with tx_out looped to the receiver. Every output (tx_out, rx_out,
// both parallel outputs) is compared after every edge with a reference model
// of all channels. The run also reports how many input bits came back on
// rx_out: with only 5 bits per pattern, a newly selected receiver has not yet
// seen a full register length of its stream, so only the bits sent while
// pattern 0 was selected from reset are expected to be recovered; the rest is
// reported, not required.
module tb_prbs_sel_sweep;
  import prbs_pkg::*;
  logic clk = 1'b0, rst = 1'b1, tx_in = 1'b0;
  logic [3:0] prbs_sel = '0;
  logic tx_out, rx_out;
  logic [63:0] tx_par, rx_par;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  prbs_transceiver u_dut (
    .clk, .rst, .en(1'b1), .prbs_sel, .tx_in, .tx_out, .rx_in(tx_out), .rx_out, .tx_par, .rx_par
  );

  bit th [M2_NUM_CH][$];
  bit rh [M2_NUM_CH][$];

  task automatic chk(input string nm, input bit ok);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s at %0t", nm, $time);
    end
  endtask

  function automatic logic [63:0] low64(ref bit h[$], input int n);
    logic [63:0] v = '0;
    for (int j = 0; j < 64 && j < n; j++) v[j] = h[h.size() - 1 - j];
    return v;
  endfunction

  initial begin : watchdog
    repeat (1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bit sent[$];
    int recovered [M2_NUM_CH];
    int bits [M2_NUM_CH];
    for (int c = 0; c < M2_NUM_CH; c++) begin
      for (int j = M2_LEN[c] - 1; j >= 0; j--) begin
        th[c].push_back(j == 0);
        rh[c].push_back(1'b0);
      end
      recovered[c] = 0; bits[c] = 0;
    end
    @(posedge clk); #1 rst = 1'b0;
    for (int k = 0; k < 69; k++) begin
      automatic int c;
      automatic bit d, rin, e_rx;
      prbs_sel = (k < 20) ? 4'(k / 5) : 4'd4;
      c = int'(prbs_sel);
      d = 1'($urandom);
      tx_in = d;
      #1 rin = tx_out;
      @(posedge clk); #1;
      for (int i = 0; i < M2_NUM_CH; i++) begin
        automatic int L = M2_LEN[i], T = M2_TAP[i];
        th[i].push_back(d ^ th[i][th[i].size() - L] ^ th[i][th[i].size() - T]);
      end
      e_rx = rin ^ rh[c][rh[c].size() - M2_LEN[c]] ^ rh[c][rh[c].size() - M2_TAP[c]];
      rh[c].push_back(rin);
      chk("tx_out", tx_out === th[c][th[c].size() - 1]);
      chk("rx_out", rx_out === e_rx);
      chk("tx_par", tx_par === low64(th[c], M2_LEN[c]));
      chk("rx_par", rx_par === low64(rh[c], M2_LEN[c]));
      sent.push_back(d);
      if (k >= 1) begin
        bits[c]++;
        if (rx_out === sent[sent.size() - 2]) recovered[c]++;
        // pattern 0 from reset: both ends start aligned
        if (c == 0) chk("pattern 0 recovers every bit", rx_out === sent[sent.size() - 2]);
      end
    end
    for (int c = 0; c < M2_NUM_CH; c++)
      $display("pattern %0d (PRBS-%0d): %0d of %0d bits recovered", c, M2_LEN[c], recovered[c], bits[c]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
