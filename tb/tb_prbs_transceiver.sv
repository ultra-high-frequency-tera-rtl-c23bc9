// tb_prbs_transceiver: self-checking test of the multichannel transceiver core.
//
// tx_out is looped to rx_in, as in the full transceiver, and the bit strobe
// comes at random intervals. A reference model keeps, for every channel, the
// history of transmitted feedback bits and of received bits, and predicts
// tx_out, rx_out and both parallel outputs after every strobe. The select walks
// through every channel and one out-of-range value (which must act as channel
// 2). On top of the exact comparison the test counts, after each change of
// prbs_sel, how many strobes pass until rx_out again equals the input sent one
// strobe earlier; that must be at most N+1 for the selected channel, and from
// then on every bit must come back.
module tb_prbs_transceiver;
  import prbs_pkg::*;
  logic clk = 1'b0, rst = 1'b1, en = 1'b0, tx_in = 1'b0;
  logic [3:0] prbs_sel = '0;
  logic tx_out, rx_out;
  logic [63:0] tx_par, rx_par;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  prbs_transceiver u_dut (
    .clk, .rst, .en, .prbs_sel, .tx_in, .tx_out, .rx_in(tx_out), .rx_out, .tx_par, .rx_par
  );

  // histories per channel, newest at the back
  bit th [M2_NUM_CH][$];
  bit rh [M2_NUM_CH][$];
  int switches = 0, resyncs = 0, idles = 0, defaults = 0;

  task automatic chk(input string nm, input bit ok);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s at %0t", nm, $time);
    end
  endtask

  function automatic int ch_of(input logic [3:0] s);
    return (int'(s) < int'(M2_NUM_CH)) ? int'(s) : int'(M2_DEFAULT_CH);
  endfunction

  function automatic logic [63:0] low64(ref bit h[$], input int n);
    logic [63:0] v = '0;
    for (int j = 0; j < 64 && j < n; j++) v[j] = h[h.size() - 1 - j];
    return v;
  endfunction

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    static logic [3:0] sels [7] = '{4'd0, 4'd1, 4'd2, 4'd3, 4'd4, 4'd9, 4'd0};
    bit prev_in;
    for (int c = 0; c < M2_NUM_CH; c++)
      for (int j = M2_LEN[c] - 1; j >= 0; j--) begin
        th[c].push_back(j == 0);
        rh[c].push_back(1'b0);
      end
    repeat (2) @(posedge clk);
    #1 rst = 1'b0;
    prev_in = 1'b0;
    foreach (sels[si]) begin
      int c, n, since, synced_at;
      prbs_sel = sels[si];
      #1;
      c = ch_of(prbs_sel);
      n = M2_LEN[c];
      if (si > 0) switches++;
      if (int'(prbs_sel) >= int'(M2_NUM_CH)) defaults++;
      since = 0; synced_at = -1;
      for (int k = 0; k < 2 * n + 40; k++) begin
        bit d, rin, e_rx;
        int gap;
        // idle cycles between strobes: nothing may change
        gap = $urandom_range(0, 2);
        for (int g = 0; g < gap; g++) begin
          logic t0, r0;
          logic [63:0] tp, rp;
          t0 = tx_out; r0 = rx_out; tp = tx_par; rp = rx_par;
          tx_in = 1'($urandom);
          @(posedge clk); #1;
          chk("idle hold", t0 === tx_out && r0 === rx_out && tp === tx_par && rp === rx_par);
          idles++;
        end
        d = 1'($urandom);
        rin = tx_out;  // what the receiver sees on this strobe
        tx_in = d; en = 1'b1;
        @(posedge clk); #1;
        en = 1'b0;
        // model update: every transmitter, the selected receiver
        for (int i = 0; i < M2_NUM_CH; i++) begin
          automatic int L = M2_LEN[i], T = M2_TAP[i];
          th[i].push_back(d ^ th[i][th[i].size() - L] ^ th[i][th[i].size() - T]);
        end
        e_rx = rin ^ rh[c][rh[c].size() - n] ^ rh[c][rh[c].size() - M2_TAP[c]];
        rh[c].push_back(rin);
        chk("tx_out", tx_out === th[c][th[c].size() - 1]);
        chk("rx_out", rx_out === e_rx);
        chk("tx_par", tx_par === low64(th[c], n));
        chk("rx_par", rx_par === low64(rh[c], n));
        // recovery of the data sent on the previous strobe
        since++;
        if (si == 0 && k >= 1) chk("data recovered from reset", rx_out === prev_in);
        if (rx_out === prev_in) begin
          if (synced_at < 0) synced_at = since;
        end else if (synced_at >= 0 && since > n + 1) begin
          chk("data recovered after sync", 1'b0);
        end
        prev_in = d;
      end
      chk($sformatf("resync within N+1 on channel %0d (%0d)", c, synced_at), synced_at >= 0 && synced_at <= n + 1);
      if (synced_at >= 0) resyncs++;
    end
    chk("mode switches happened", switches == 6);
    chk("out-of-range select used", defaults == 1);
    chk("idle cycles happened", idles > 0);
    $display("switches=%0d resyncs=%0d idle=%0d default=%0d", switches, resyncs, idles, defaults);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
