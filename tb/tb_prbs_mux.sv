// tb_prbs_mux: exhaustive test of the channel multiplexer.
//
// A 5-channel, 8-bit wide instance with random channel values: every select
// value 0..15 is applied; 0..4 must return that channel, 5..15 the default
// channel 2. A 1-bit instance with 8 channels is checked the same way.
module tb_prbs_mux;
  int checks = 0, failures = 0;
  logic [3:0] sel;
  logic [7:0] din5 [5];
  logic [7:0] dout5;
  logic       din8 [8];
  logic       dout8;

  prbs_mux #(.NUM_CH(5), .WIDTH(8)) u5 (.sel(sel), .din(din5), .dout(dout5));
  prbs_mux #(.NUM_CH(8), .WIDTH(1), .DEFAULT_CH(2)) u8 (.sel(sel), .din(din8), .dout(dout8));

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int rep = 0; rep < 50; rep++) begin
      foreach (din5[i]) din5[i] = 8'($urandom);
      foreach (din8[i]) din8[i] = 1'($urandom);
      for (int s = 0; s < 16; s++) begin
        logic [7:0] e5;
        logic       e8;
        sel = 4'(s);
        #1;
        e5 = (s < 5) ? din5[s] : din5[2];
        e8 = (s < 8) ? din8[s] : din8[2];
        checks++; if (dout5 !== e5) begin failures++; $display("FAIL mux5 sel=%0d", s); end
        checks++; if (dout8 !== e8) begin failures++; $display("FAIL mux8 sel=%0d", s); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
