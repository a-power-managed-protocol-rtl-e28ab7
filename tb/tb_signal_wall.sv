// tb_signal_wall: all four combinations of pd_en and open with random data;
// the output must equal the input only when both are high and be zero
// otherwise.
module tb_signal_wall;
  logic [15:0] hot, gated;
  logic        pd_en, open;
  int checks = 0, failures = 0;

  signal_wall #(.W(16)) dut (.hot, .pd_en, .open, .gated);

  initial begin : watchdog
    #1000000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 400; t++) begin
      hot   = 16'($urandom) | 16'h0001;
      pd_en = t[0];
      open  = t[1];
      #1;
      checks++;
      if (gated !== ((pd_en && open) ? hot : 16'h0)) begin
        failures++;
        $display("FAIL: pd_en=%0b open=%0b hot=%h gated=%h", pd_en, open, hot, gated);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
