// chip_model_tb - plays the FPGA side towards the chip model: generates the chip
// clock (3 system cycles per half period), shifts commands out on falling edges
// and samples the answer on rising edges. Runs write-global-register, clear,
// open gate, a pause, close gate and reads of two rows / counters, then checks
// every returned pixel against E*(k+1) + row*192 + col + greg, with E the
// number of system cycles between the open and close commands taking effect.
module chip_model_tb;
  import pts_pkg::*;
  logic clk = 0, rst_n = 0, sclk = 0, din = 0, dout;
  int checks = 0, failures = 0, cyc = 0;

  chip_model dut (.*);

  always #5 clk = !clk;
  always @(posedge clk) cyc++;

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  int last_rise;
  bit rx [$];
  // one chip clock period: drive the bit during the low phase, rise, sample
  task automatic clk_bit(logic b);
    @(negedge clk); din = b;
    repeat (2) @(negedge clk);
    sclk = 1; last_rise = cyc;
    repeat (3) @(negedge clk);
    rx.push_back(dout);
    sclk = 0;
  endtask

  task automatic command(chip_op_e op, logic [7:0] arg, int pad);
    logic [15:0] w = {1'b1, op, arg};
    rx.delete();
    for (int i = 15; i >= 0; i--) clk_bit(w[i]);
    for (int i = 0; i < pad; i++) clk_bit(1'b0);
  endtask

  task automatic read_row(int k, int row, int greg, int ev);
    int p;
    command(OP_READ, {2'(k), 6'(row)}, PIX_BITS * (COLS + 1));
    // rx[0..15] were sampled during the command itself
    for (int c = 0; c < COLS; c++) begin
      logic [15:0] v = '0;
      for (int b = 0; b < 16; b++) begin
        p = 16 + (15 - b) * (COLS + 1);
        if (c == 0) check(rx[p] == 1'b1, "start bit");
        v[b] = rx[p + 1 + (COLS - 1 - c)];
      end
      check(v == 16'(ev * (k + 1) + row * COLS + c + greg),
            $sformatf("k%0d row%0d col%0d: %0d", k, row, c, v));
    end
  endtask

  int t_open, t_close;
  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    command(OP_WRITE_GREG, 8'd5, 0);
    command(OP_CLEAR, 8'd0, 0);
    command(OP_OPEN_GATE, 8'd0, 0);  t_open = last_rise;
    repeat (100) @(negedge clk);
    command(OP_CLOSE_GATE, 8'd0, 0); t_close = last_rise;
    repeat (50) @(negedge clk);
    read_row(1, 3, 5, t_close - t_open);
    read_row(0, 63, 5, t_close - t_open);
    command(OP_WRITE_GREG, 8'd200, 0);
    command(OP_CLEAR, 8'd0, 0);
    read_row(2, 10, 200, 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (300000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
