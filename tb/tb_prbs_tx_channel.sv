// tb_prbs_tx_channel: self-checking test of the transmitter PRBS channel.
//
// Three instances: PRBS-7 (x^7+x^6+1), PRBS-15 (x^15+x^14+1) and the default
// PRBS-48 (x^48+x^47+1). Each output bit is compared with the recurrence
//   out[k] = in[k] ^ out[k-N] ^ out[k-TAP]
// evaluated on a history queue seeded from the reset value, and the parallel
// output with the last N output bits. With the input held low, PRBS-7 and
// PRBS-15 must repeat after exactly 2^N-1 bits and not earlier. Strobe-low
// cycles must leave every register unchanged.
module tb_prbs_tx_channel;
  logic clk = 1'b0, rst = 1'b1, en = 1'b0, din = 1'b0;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  logic o7, o15, o48;
  logic [6:0]  p7;
  logic [14:0] p15;
  logic [47:0] p48;

  prbs_tx_channel #(.N(7),  .TAP(6))  u7  (.clk, .rst, .en, .tx_in(din), .tx_out(o7),  .par(p7));
  prbs_tx_channel #(.N(15), .TAP(14)) u15 (.clk, .rst, .en, .tx_in(din), .tx_out(o15), .par(p15));
  prbs_tx_channel                     u48 (.clk, .rst, .en, .tx_in(din), .tx_out(o48), .par(p48));

  // history queues, newest bit at the back; seeded with the reset value 1
  bit h7[$], h15[$], h48[$];

  function automatic void seed(ref bit h[$], input int n);
    h.delete();
    for (int j = n - 1; j >= 0; j--) h.push_back(j == 0);  // stage 1 = 1
  endfunction

  function automatic bit nxt(ref bit h[$], input int n, input int t, input bit d);
    bit b = d ^ h[h.size() - n] ^ h[h.size() - t];
    h.push_back(b);
    return b;
  endfunction

  task automatic chk(input string nm, input bit got, input bit exp);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 10) $display("FAIL %s got %0b exp %0b at %0t", nm, got, exp, $time);
    end
  endtask

  task automatic chk_par(input string nm, ref bit h[$], input int n, input logic [255:0] par);
    bit ok = 1'b1;
    for (int j = 0; j < n; j++) if (par[j] !== h[h.size() - 1 - j]) ok = 1'b0;
    chk({nm, " par"}, ok, 1'b1);
  endtask

  // one strobe with data d, then check
  task automatic step(input bit d);
    bit e7, e15, e48;
    din = d; en = 1'b1;
    @(posedge clk); #1;
    en = 1'b0;
    e7 = nxt(h7, 7, 6, d); e15 = nxt(h15, 15, 14, d); e48 = nxt(h48, 48, 47, d);
    chk("o7", o7, e7); chk("o15", o15, e15); chk("o48", o48, e48);
  endtask

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [6:0]  s7_0;
    logic [14:0] s15_0;
    int first7, first15;
    seed(h7, 7); seed(h15, 15); seed(h48, 48);
    repeat (2) @(posedge clk);
    #1 rst = 1'b0;
    chk("reset p7", p7 == 7'd1, 1'b1);
    chk("reset p48", p48 == 48'd1, 1'b1);

    // random data through all three channels
    for (int k = 0; k < 600; k++) begin
      step(1'($urandom));
      chk_par("p7", h7, 7, 256'(p7));
      chk_par("p15", h15, 15, 256'(p15));
      chk_par("p48", h48, 48, 256'(p48));
      // idle cycle: strobe low, nothing may move
      begin
        logic [47:0] keep;
        keep = p48;
        din = 1'b1;
        @(posedge clk); #1;
        chk("hold p48", p48 == keep, 1'b1);
      end
    end

    // free-running PRBS: input low, period must be exactly 2^N-1
    s7_0 = p7; s15_0 = p15;
    first7 = 0; first15 = 0;
    for (int k = 1; k <= 32767; k++) begin
      step(1'b0);
      if (first7 == 0 && p7 == s7_0)   first7 = k;
      if (first15 == 0 && p15 == s15_0) first15 = k;
    end
    chk("PRBS-7 state nonzero", s7_0 != 0, 1'b1);
    checks++; if (first7 != 127)   begin failures++; $display("FAIL PRBS-7 period %0d", first7); end
    checks++; if (first15 != 32767) begin failures++; $display("FAIL PRBS-15 period %0d", first15); end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
