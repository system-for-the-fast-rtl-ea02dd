// tx_line_switch_tb - exhaustive check of the ASIC / model line switch: the
// selected port follows the transceiver, the other is held low, and the
// receiver sees the selected port's data line.
module tx_line_switch_tb;
  logic sel, sclk, dout, din, asic_clk, asic_din, asic_dout, model_clk, model_din, model_dout;
  int checks = 0, failures = 0;

  tx_line_switch dut (.*);

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    for (int v = 0; v < 32; v++) begin
      {sel, sclk, dout, asic_dout, model_dout} = 5'(v);
      #1;
      check(asic_clk  == (!sel && sclk), "asic clk");
      check(asic_din  == (!sel && dout), "asic din");
      check(model_clk == ( sel && sclk), "model clk");
      check(model_din == ( sel && dout), "model din");
      check(din == (sel ? model_dout : asic_dout), "receiver data");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
