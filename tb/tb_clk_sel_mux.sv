// tb_clk_sel_mux: exhaustive test of the clock selector.
//
// Six clocks into an 8-input selector: for every select value and random
// clock/pulse inputs, clk_out and tick must follow the selected input, and the
// two spare inputs (6, 7) must give low outputs. A nine-clock, 16-input
// instance is checked the same way.
module tb_clk_sel_mux;
  int checks = 0, failures = 0;

  logic [2:0] sel8;
  logic [5:0] clk6, rise6;
  logic       co8, tk8;
  logic [3:0] sel16;
  logic [8:0] clk9, rise9;
  logic       co16, tk16;

  clk_sel_mux                                 u8  (.clk_sel(sel8),  .clk_in(clk6), .rise_in(rise6), .clk_out(co8),  .tick(tk8));
  clk_sel_mux #(.NUM_IN(16), .NUM_CLK(9))     u16 (.clk_sel(sel16), .clk_in(clk9), .rise_in(rise9), .clk_out(co16), .tick(tk16));

  initial begin : watchdog
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int rep = 0; rep < 64; rep++) begin
      clk6 = 6'($urandom); rise6 = 6'($urandom);
      clk9 = 9'($urandom); rise9 = 9'($urandom);
      for (int s = 0; s < 16; s++) begin
        sel8 = 3'(s); sel16 = 4'(s);
        #1;
        if (s < 8) begin
          checks++;
          if (co8 !== (s < 6 ? clk6[s] : 1'b0) || tk8 !== (s < 6 ? rise6[s] : 1'b0)) begin
            failures++; $display("FAIL 8-input sel=%0d", s);
          end
        end
        checks++;
        if (co16 !== (s < 9 ? clk9[s] : 1'b0) || tk16 !== (s < 9 ? rise9[s] : 1'b0)) begin
          failures++; $display("FAIL 16-input sel=%0d", s);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
