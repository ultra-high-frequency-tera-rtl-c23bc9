// tb_prbs_demux: exhaustive test of the receiver de-multiplexer.
//
// For every select value 0..15 and every combination of strobe and data bit the
// strobe and data must appear only on the selected channel (channel 2 for
// out-of-range selects); all other outputs must be low.
module tb_prbs_demux;
  int checks = 0, failures = 0;
  logic [3:0] sel;
  logic       en, din;
  logic [4:0] ch_en, ch_bit;

  prbs_demux u_dut (.sel(sel), .en(en), .din(din), .ch_en(ch_en), .ch_bit(ch_bit));

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int s = 0; s < 16; s++)
      for (int c = 0; c < 4; c++) begin
        int tgt;
        logic [4:0] onehot;
        sel = 4'(s); en = c[0]; din = c[1];
        #1;
        tgt = (s < 5) ? s : 2;
        onehot = 5'(1) << tgt;
        checks++; if (ch_en  !== (en  ? onehot : 5'b0)) begin failures++; $display("FAIL en sel=%0d c=%0d", s, c); end
        checks++; if (ch_bit !== (din ? onehot : 5'b0)) begin failures++; $display("FAIL bit sel=%0d c=%0d", s, c); end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
