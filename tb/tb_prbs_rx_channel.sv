// tb_prbs_rx_channel: self-checking test of the receiver PRBS channel.
//
// Part 1: random received bits into PRBS-48 (default) and PRBS-255
// (x^255+x^254+1); after every strobe rx_out must equal
//   rx[k] ^ rx[k-N] ^ rx[k-TAP]
// computed on a history queue seeded with the reset value (all zeros), and par must hold the
// last N received bits. Part 2: a stream scrambled by a reference model that
// starts from a different state than the receiver; after N bits the receiver
// must return the original data on every bit (self-synchronisation), and
// strobe-low cycles must change nothing.
module tb_prbs_rx_channel;
  logic clk = 1'b0, rst = 1'b1, en = 1'b0, din = 1'b0;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  logic o48, o255;
  logic [47:0]  p48;
  logic [254:0] p255;

  prbs_rx_channel                        u48  (.clk, .rst, .en, .rx_in(din), .rx_out(o48),  .par(p48));
  prbs_rx_channel #(.N(255), .TAP(254))  u255 (.clk, .rst, .en, .rx_in(din), .rx_out(o255), .par(p255));

  bit h48[$], h255[$];

  function automatic void seed(ref bit h[$], input int n);
    h.delete();
    for (int j = n - 1; j >= 0; j--) h.push_back(1'b0);
  endfunction

  task automatic chk(input string nm, input bit got, input bit exp);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 10) $display("FAIL %s got %0b exp %0b at %0t", nm, got, exp, $time);
    end
  endtask

  function automatic bit desc(ref bit h[$], input int n, input int t, input bit r);
    bit b = r ^ h[h.size() - n] ^ h[h.size() - t];
    h.push_back(r);
    return b;
  endfunction

  task automatic strobe(input bit r);
    din = r; en = 1'b1;
    @(posedge clk); #1;
    en = 1'b0;
  endtask

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bit ok;
    bit tx_h[$];
    bit data[$];
    seed(h48, 48); seed(h255, 255);
    repeat (2) @(posedge clk);
    #1 rst = 1'b0;
    chk("reset out", o48, 1'b0);

    // part 1: random received bits
    for (int k = 0; k < 1000; k++) begin
      bit r, e48, e255;
      r = 1'($urandom);
      strobe(r);
      e48 = desc(h48, 48, 47, r); e255 = desc(h255, 255, 254, r);
      chk("o48", o48, e48); chk("o255", o255, e255);
      ok = 1'b1;
      for (int j = 0; j < 48; j++) if (p48[j] !== h48[h48.size() - 1 - j]) ok = 1'b0;
      chk("p48", ok, 1'b1);
      ok = 1'b1;
      for (int j = 0; j < 255; j++) if (p255[j] !== h255[h255.size() - 1 - j]) ok = 1'b0;
      chk("p255", ok, 1'b1);
    end

    // part 2: scrambled stream from a reference scrambler in an unrelated state
    for (int j = 0; j < 48; j++) tx_h.push_back(1'($urandom));
    for (int k = 0; k < 400; k++) begin
      bit d, s;
      logic [47:0] keep;
      d = 1'($urandom);
      s = d ^ tx_h[tx_h.size() - 48] ^ tx_h[tx_h.size() - 47];
      tx_h.push_back(s);
      strobe(s);
      if (k >= 48) chk("recovered", o48, d);
      keep = p48;
      din = ~din;
      @(posedge clk); #1;
      chk("hold", p48 == keep, 1'b1);
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
