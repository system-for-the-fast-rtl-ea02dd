// csr_regs_tb - exercises the register map over the Avalon-MM port: control
// fields reach their outputs, status inputs are readable, a TX_LEN write
// issues one direct command that stays pending until taken, a SEQ_CTRL write
// gives a one-cycle trigger, flags clear on writing 1, and done pulses count.
module csr_regs_tb;
  import pts_pkg::*;
  logic clk = 0, rst_n = 0;
  logic [3:0] avs_address = 0;
  logic avs_read = 0, avs_write = 0, avs_readdatavalid;
  logic [31:0] avs_writedata = 0, avs_readdata;
  logic line_sel, raw_mode, cmd_valid, cmd_ready = 0, tx_busy = 0;
  logic [7:0] pe_bypass, pe_bypassed = 8'h00;
  logic [15:0] half_period;
  tx_cmd_t cmd;
  logic seq_trigger, seq_active = 0, seq_done = 0;
  logic [9:0] seq_start;
  logic rx_overrun = 0, rx_overrun_clr, dsc_overflow = 0, dsc_overflow_clr;
  logic [31:0] rx_count = 0;
  logic [11:0] dsc_wptr = 0, dsc_rptr;
  int checks = 0, failures = 0;

  csr_regs dut (.*);

  always #5 clk = !clk;

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic wr(int a, logic [31:0] d);
    @(negedge clk); avs_write = 1; avs_address = 4'(a); avs_writedata = d;
    @(negedge clk); avs_write = 0;
  endtask

  task automatic rd(int a, output logic [31:0] d);
    @(negedge clk); avs_read = 1; avs_address = 4'(a);
    @(negedge clk); avs_read = 0;
    check(avs_readdatavalid, "readdatavalid");
    d = avs_readdata;
  endtask

  int ntrig = 0;
  bit clr_rx_seen = 0, clr_ovf_seen = 0;
  always @(posedge clk) if (rst_n) begin
    if (seq_trigger) ntrig++;
    if (rx_overrun_clr) clr_rx_seen = 1;
    if (dsc_overflow_clr) clr_ovf_seen = 1;
  end

  logic [31:0] v;
  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    check(half_period == 16'd4 && !cmd_valid && !line_sel, "reset values");
    wr(0, 32'h0000_0203);
    check(line_sel && raw_mode && pe_bypass == 8'h02, "CTRL fields");
    rd(0, v); check(v == 32'h0000_0203, "CTRL readback");
    wr(1, 32'd9); check(half_period == 16'd9, "CLKDIV");
    wr(2, 32'hCAFE_0001);
    wr(3, 32'd300);
    check(cmd_valid && cmd.data == 32'hCAFE_0001 && cmd.len == 16'd300, "direct command");
    rd(4, v); check(v[1] == 1'b1, "command pending in STATUS");
    repeat (3) @(negedge clk);
    check(cmd_valid, "command held until taken");
    cmd_ready = 1; @(negedge clk); cmd_ready = 0;
    check(!cmd_valid, "command taken");
    wr(6, 32'd77); check(seq_start == 10'd77, "SEQ_START");
    wr(5, 32'd1);  repeat (2) @(negedge clk);
    check(ntrig == 1, $sformatf("one trigger pulse (%0d)", ntrig));
    tx_busy = 1; seq_active = 1; rx_overrun = 1; dsc_overflow = 1; pe_bypassed = 8'h02;
    rd(4, v); check(v[4:0] == 5'b11101 && v[15:8] == 8'h02, $sformatf("STATUS %h", v));
    wr(4, 32'h18);
    check(clr_rx_seen && clr_ovf_seen, "flag clears issued");
    rx_count = 32'd1234; dsc_wptr = 12'd345;
    rd(7, v); check(v == 32'd1234, "RX_COUNT");
    rd(8, v); check(v == 32'd345, "DSC_WPTR");
    wr(9, 32'd100); check(dsc_rptr == 12'd100, "DSC_RPTR");
    rd(9, v); check(v == 32'd100, "DSC_RPTR readback");
    @(negedge clk); seq_done = 1; @(negedge clk); @(negedge clk); seq_done = 0;
    rd(10, v); check(v == 32'd2, "SEQ_DONE count");
    rd(13, v); check(v == 0, "unused address reads zero");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
