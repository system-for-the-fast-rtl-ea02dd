// tx_transmitter_tb - sends commands of several lengths (short, exactly 32, and
// longer than 32 with zero padding) through the transmitter driven by a real
// clock generator, samples dout on every rising sclk edge and compares the bits
// with the expected sequence; also checks that exactly len edges occur and that
// the clock stops between commands.
module tx_transmitter_tb;
  import pts_pkg::*;
  logic clk = 0, rst_n = 0;
  logic cmd_valid = 0, cmd_ready, clk_en, dout, busy, sclk, rise, fall;
  tx_cmd_t cmd = '0;
  logic [15:0] half_period = 2;
  int checks = 0, failures = 0;

  tx_transmitter dut (.clk, .rst_n, .cmd_valid, .cmd, .cmd_ready, .fall, .clk_en, .dout, .busy);
  tx_clock_gen   cg  (.clk, .rst_n, .en(clk_en), .half_period, .sclk, .rise, .fall);

  always #5 clk = !clk;

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  // Capture of the bits seen by the chip on rising sclk edges.
  logic sclk_q = 0;
  bit   seen [$];
  always @(posedge clk) begin
    sclk_q <= sclk;
    if (rst_n && sclk && !sclk_q) seen.push_back(dout);
  end

  task automatic send(int len, logic [31:0] data);
    bit exp [$];
    int cycles = 0;
    for (int i = 0; i < len; i++) begin
      if (len <= 32) exp.push_back(data[len-1-i]);
      else           exp.push_back(i < 32 ? data[31-i] : 1'b0);
    end
    seen.delete();
    @(negedge clk);
    cmd_valid = 1; cmd = '{len: 16'(len), data: data};
    do @(posedge clk); while (!cmd_ready);
    @(negedge clk); cmd_valid = 0;
    while (busy) begin @(posedge clk); cycles++; end
    repeat (20) @(posedge clk);
    check(seen.size() == len, $sformatf("len %0d: %0d edges", len, seen.size()));
    for (int i = 0; i < len && i < seen.size(); i++)
      check(seen[i] == exp[i], $sformatf("len %0d bit %0d", len, i));
    // one command lasts len chip clock periods
    check(cycles >= len * 2 * (half_period + 1) - 2 && cycles <= len * 2 * (half_period + 1) + 2,
          $sformatf("len %0d took %0d cycles", len, cycles));
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    send(16, 32'h0000_A5C3);
    send(1, 32'h1);
    send(32, 32'hDEAD_BEEF);
    send(7, 32'h55);
    half_period = 0;
    send(40, 32'h8000_0001);
    half_period = 5;
    send(12, $urandom);
    for (int k = 0; k < 6; k++) send(1 + ($urandom % 48), $urandom);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
