// tx_clock_gen_tb - checks the gated chip clock: period 2*(half_period+1) system
// cycles for several settings (changed at run time), strobes that announce each
// sclk edge one cycle ahead, and a clock that rests low while disabled.
module tx_clock_gen_tb;
  logic clk = 0, rst_n = 0, en = 0;
  logic [15:0] half_period = 0;
  logic sclk, rise, fall;
  int checks = 0, failures = 0;

  tx_clock_gen dut (.*);

  always #5 clk = !clk;

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // Strobe in cycle n must match the sclk transition at the end of cycle n.
  logic prev_sclk, prev_rise, prev_fall;
  always @(posedge clk) begin
    prev_sclk <= sclk; prev_rise <= rise; prev_fall <= fall;
  end
  always @(negedge clk) if (rst_n && en) begin
    if (prev_rise) check(sclk && !prev_sclk, "rise strobe without rising sclk");
    if (prev_fall) check(!sclk && prev_sclk, "fall strobe without falling sclk");
  end

  task automatic measure(int hp);
    int t_rise [3];
    int n = 0, cyc = 0;
    half_period = 16'(hp);
    en = 1;
    while (n < 3) begin
      @(posedge clk);
      cyc++;
      if (rise) begin t_rise[n] = cyc; n++; end
      if (cyc > 1000) break;
    end
    check(n == 3, "no rising edges");
    check(t_rise[1] - t_rise[0] == 2 * (hp + 1), $sformatf("period hp=%0d: %0d", hp, t_rise[1] - t_rise[0]));
    check(t_rise[2] - t_rise[1] == 2 * (hp + 1), "second period");
    // first rise after enabling comes after half a period
    check(t_rise[0] == hp + 1, $sformatf("first rise hp=%0d at %0d", hp, t_rise[0]));
    en = 0;
    @(posedge clk); #1;
    check(!sclk, "clock returns low when disabled");
    repeat (20) begin
      @(posedge clk); #1;
      check(!sclk && !rise && !fall, "clock idle while disabled");
    end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(posedge clk); #1;
    measure(0);
    measure(1);
    measure(4);
    measure(9);
    measure(37);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
