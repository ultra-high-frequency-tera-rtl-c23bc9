// tb_clk_freq_gen: self-checking test of the clock frequency generator.
//
// After reset the reference cycle count c is tracked independently; divided
// clock i must equal bit W_i-1 of c (it toggles every 2^(W_i-1) cycles), and
// rise[i] must be high exactly when c mod 2^W_i == 2^(W_i-1). A short instance
// (widths 2, 3, 5, 8) runs through many periods; the default instance (20..70
// bits) runs past the first rising edge of its 20-bit clock, at cycle 2^19, and
// through one full period of it. Every clock of the short instance must rise
// at least once.
module tb_clk_freq_gen;
  logic clk = 1'b0, rst = 1'b1;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  localparam int unsigned SW [4] = '{2, 3, 5, 8};
  localparam int unsigned DW [6] = '{20, 30, 40, 50, 60, 70};

  logic [3:0] s_div, s_rise;
  logic [5:0] d_div, d_rise;

  clk_freq_gen #(.NUM_CLK(4), .CNT_W(SW)) u_s (.clk, .rst, .clk_div(s_div), .rise(s_rise));
  clk_freq_gen                            u_d (.clk, .rst, .clk_div(d_div), .rise(d_rise));

  longint unsigned c;
  int s_rises [4];
  int d0_rises;

  task automatic chk(input string nm, input bit ok);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s at cycle %0d", nm, c);
    end
  endtask

  initial begin : watchdog
    repeat (1200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    #1 rst = 1'b0;
    c = 0;
    d0_rises = 0;
    foreach (s_rises[i]) s_rises[i] = 0;
    while (c < (64'd1 << 20) + 64'd100) begin
      automatic bit ok = 1'b1;
      for (int i = 0; i < 4; i++) begin
        automatic longint unsigned m = c & ((64'd1 << SW[i]) - 1);
        if (s_div[i]  !== 1'(c >> (SW[i] - 1))) ok = 1'b0;
        if (s_rise[i] !== (m == (64'd1 << (SW[i] - 1)))) ok = 1'b0;
        if (s_rise[i]) s_rises[i]++;
      end
      for (int i = 0; i < 6; i++) begin
        automatic longint unsigned m = (DW[i] >= 64) ? c : (c & ((64'd1 << DW[i]) - 1));
        automatic bit exp_div = (DW[i] > 64) ? 1'b0 : 1'(c >> (DW[i] - 1));
        if (d_div[i]  !== exp_div) ok = 1'b0;
        if (d_rise[i] !== (DW[i] <= 64 && m == (64'd1 << (DW[i] - 1)))) ok = 1'b0;
      end
      if (d_rise[0]) d0_rises++;
      if (!ok && failures < 3) $display("s_div=%b s_rise=%b d_div=%b d_rise=%b", s_div, s_rise, d_div, d_rise);
      chk("divided clocks", ok);
      @(posedge clk); #1;
      c++;
    end
    foreach (s_rises[i]) chk($sformatf("short clock %0d rose", i), s_rises[i] > 0);
    chk("20-bit clock rose exactly once", d0_rises == 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
