// sequencer_tb - loads a program through the host port of the sequencer RAM,
// reads one entry back, triggers it and checks, against a transmitter model,
// the forwarded commands and the exact N+3 cycle gap after a delay entry.
module sequencer_tb;
  import pts_pkg::*;
  logic clk = 0, rst_n = 0, trigger = 0;
  logic [9:0] avs_address = 0, start_addr = 0;
  logic avs_write = 0, avs_read = 0, avs_readdatavalid;
  logic [63:0] avs_writedata = 0, avs_readdata;
  logic active, done, cmd_valid, cmd_ready, tx_busy;
  tx_cmd_t cmd;
  int checks = 0, failures = 0, cyc = 0;

  sequencer dut (.*);

  always #5 clk = !clk;
  always @(posedge clk) cyc++;

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  int busy_left = 0, idle_since = 0;
  tx_cmd_t got [$];
  int got_gap [$];
  assign tx_busy   = busy_left > 0;
  assign cmd_ready = !tx_busy;
  always @(posedge clk) begin
    if (cmd_valid && cmd_ready) begin
      got.push_back(cmd); got_gap.push_back(cyc - idle_since);
      busy_left <= int'(cmd.len);
    end else if (busy_left > 0) begin
      busy_left <= busy_left - 1;
      if (busy_left == 1) idle_since <= cyc + 1;
    end
  end

  task automatic wr(int a, seq_entry_t e);
    @(negedge clk); avs_write = 1; avs_address = 10'(a); avs_writedata = e;
    @(negedge clk); avs_write = 0;
  endtask

  seq_entry_t rd;
  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    wr(20, '{last: 0, kind: SEQ_CMD,   rsvd: '0, len: 16'd8,  data: 32'h81});
    wr(21, '{last: 0, kind: SEQ_DELAY, rsvd: '0, len: '0,     data: 32'd17});
    wr(22, '{last: 0, kind: SEQ_CMD,   rsvd: '0, len: 16'd8,  data: 32'h82});
    wr(23, '{last: 1, kind: SEQ_CMD,   rsvd: '0, len: 16'd30, data: 32'h83});
    @(negedge clk); avs_read = 1; avs_address = 10'd21;
    @(negedge clk); avs_read = 0;
    rd = seq_entry_t'(avs_readdata);
    check(avs_readdatavalid && rd.data == 32'd17 && rd.kind == SEQ_DELAY, "read back");
    @(negedge clk); start_addr = 10'd20; trigger = 1;
    @(negedge clk); trigger = 0;
    while (active) @(negedge clk);
    check(got.size() == 3, "three commands");
    if (got.size() == 3) begin
      check(got[0].data == 32'h81 && got[1].data == 32'h82 && got[2].data == 32'h83, "order");
      check(got[2].len == 16'd30, "length");
      check(got_gap[1] == 17 + 3, $sformatf("delay gap %0d", got_gap[1]));
    end
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
