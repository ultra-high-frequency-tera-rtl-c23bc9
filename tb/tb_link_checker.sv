// tb_link_checker: stimulus and checker for one clocked PRBS transceiver.
//
// Used by the top-level testbenches, one instance per transceiver variant. It
// runs NUM_PHASES phases; phase p selects clock p mod NUM_CLK and pattern
// p mod (NUM_CH+1), where the last pattern number is replaced by the
// out-of-range select 9 (the default channel). Each phase sends LEN+EXTRA_TICKS
// random bits, one per strobe, holding tx_in for a whole clock period. It
// checks, against its own count of reference cycles since reset:
//   * that strobes come exactly when the selected counter reaches 2^(W-1);
//   * (unless FAST) that clk_out is bit W-1 of the count and tx_out only
//     moves on strobes; with FAST the checker wakes only on strobe edges,
//     which keeps long-divider simulations fast;
//   * that rx_out returns the bit sent one strobe earlier from the second
//     strobe after reset, and within N+1 strobes after every pattern switch.
// With SPARE_TEST it then selects every spare clock-mux input for 300 cycles
// and checks that no strobe comes and the link is frozen. Counters report how
// often each mechanism occurred; done goes high at the end.
module tb_link_checker #(
  parameter int unsigned NUM_CH            = 5,
  parameter int unsigned LEN [NUM_CH]      = '{48, 51, 63, 127, 255},
  parameter int unsigned DEFAULT_CH        = 2,
  parameter int unsigned NUM_CLK           = 6,
  parameter int unsigned CNT_W [NUM_CLK]   = '{2, 3, 4, 5, 6, 7},
  parameter int unsigned NUM_CLK_IN        = 8,
  parameter int unsigned CLK_SEL_W         = $clog2(NUM_CLK_IN),
  parameter int unsigned NUM_PHASES        = 7,
  parameter int unsigned EXTRA_TICKS       = 30,
  parameter bit          SPARE_TEST        = 1'b1,
  parameter bit          FAST              = 1'b0
) (
  input  logic                 clk,
  input  logic                 rst,
  output logic [CLK_SEL_W-1:0] clk_sel,
  output logic [3:0]           prbs_sel,
  output logic                 tx_in,
  input  logic                 tx_out,
  input  logic                 rx_out,
  input  logic                 clk_out,
  input  logic                 bit_tick,
  output int                   checks,
  output int                   failures,
  output int                   n_pattern_switch,
  output int                   n_clock_switch,
  output int                   n_default_sel,
  output int                   n_spare_clock,
  output int                   n_resync,
  output int                   n_strobes,
  output bit                   done
);

  longint unsigned cyc;
  always @(posedge clk) cyc <= rst ? 64'd0 : cyc + 64'd1;

  initial begin
    checks = 0; failures = 0; n_pattern_switch = 0; n_clock_switch = 0;
    n_default_sel = 0; n_spare_clock = 0; n_resync = 0; n_strobes = 0; done = 1'b0;
    clk_sel = '0; prbs_sel = '0; tx_in = 1'b0;
  end

  task automatic chk(input string nm, input bit ok);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %m: %s at cycle %0d", nm, cyc);
    end
  endtask

  function automatic bit tick_due(input int w, input longint unsigned c);
    if (w > 63) return 1'b0;
    return (c & ((64'd1 << w) - 1)) == (64'd1 << (w - 1));
  endfunction

  function automatic bit level(input int w, input longint unsigned c);
    if (w > 64) return 1'b0;
    return 1'(c >> (w - 1));
  endfunction

  bit sent[$];

  task automatic phase(input int p);
    int cs, ps, ch, n, since, nt, good;
    bit pending;
    logic t0;
    cs = p % NUM_CLK;
    ps = p % (NUM_CH + 1);
    if (ps == NUM_CH) ps = 9;
    ch = (ps < NUM_CH) ? ps : DEFAULT_CH;
    n = LEN[ch];
    nt = n + EXTRA_TICKS;
    if (p > 0 && 4'(ps) != prbs_sel) n_pattern_switch++;
    if (p > 0 && CLK_SEL_W'(cs) != clk_sel) n_clock_switch++;
    if (ps >= NUM_CH) n_default_sel++;
    clk_sel = CLK_SEL_W'(cs);
    prbs_sel = 4'(ps);
    #1;
    since = 0; pending = 1'b0; good = 0;
    if (bit_tick) begin
      // the new selection strobes at the very next edge
      sent.push_back(tx_in);
      pending = 1'b1;
      n_strobes++;
    end
    if (FAST) begin
      // Strobe-driven: wake only on the edges where a strobe is taken. The
      // input in effect at that edge is the one set after the previous strobe.
      if (pending) begin
        @(posedge clk); #1;
        pending = 1'b0;
        since++;
        tx_in = 1'($urandom);
      end
      while (since < nt) begin
        @(posedge clk iff bit_tick); #1;
        chk("strobe timing", tick_due(CNT_W[cs], cyc - 64'd1));
        sent.push_back(tx_in);
        n_strobes++;
        since++;
        if ((p == 0 && since >= 2) || since > n + 1) begin
          chk($sformatf("rx_out recovers data (clock %0d, pattern %0d)", cs, ps),
              rx_out === sent[sent.size() - 2]);
          good++;
        end
        tx_in = 1'($urandom);
      end
    end
    while (since < nt) begin
      t0 = tx_out;
      @(posedge clk); #1;
      if (pending) begin
        pending = 1'b0;
        since++;
        if ((p == 0 && since >= 2) || since > n + 1) begin
          chk($sformatf("rx_out recovers data (clock %0d, pattern %0d)", cs, ps),
              rx_out === sent[sent.size() - 2]);
          good++;
        end
        tx_in = 1'($urandom);
      end else if (!FAST) begin
        chk("tx_out stable between strobes", tx_out === t0);
      end
      if (!FAST) begin
        chk("clk_out level", clk_out === level(CNT_W[cs], cyc));
        chk("strobe timing", bit_tick === tick_due(CNT_W[cs], cyc));
      end
      if (bit_tick) begin
        sent.push_back(tx_in);
        pending = 1'b1;
        n_strobes++;
      end
    end
    if (p > 0 && good > 0) n_resync++;
    @(posedge clk); #1;
  endtask

  initial begin
    @(negedge rst);
    @(posedge clk); #1;
    for (int p = 0; p < NUM_PHASES; p++) phase(p);
    if (SPARE_TEST) begin
      for (int s = NUM_CLK; s < NUM_CLK_IN; s++) begin
        logic t0;
        clk_sel = CLK_SEL_W'(s);
        #1 t0 = tx_out;
        for (int k = 0; k < 300; k++) begin
          @(posedge clk); #1;
          chk("spare clock input: no strobe", bit_tick === 1'b0 && clk_out === 1'b0);
          chk("spare clock input: link frozen", tx_out === t0);
          tx_in = 1'($urandom);
        end
        n_spare_clock++;
      end
    end
    done = 1'b1;
  end

endmodule
