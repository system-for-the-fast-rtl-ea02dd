// seq_fetcher_tb - runs two programs from a RAM model against a transmitter
// model that stays busy for len cycles per command. Checks the order and
// content of the forwarded commands, the exact gap of N+3 cycles between the
// end of a transmission and the next command after a delay entry of N cycles,
// the stop at the `last` entry, the done pulse and the active flag.
module seq_fetcher_tb;
  import pts_pkg::*;
  logic clk = 0, rst_n = 0, trigger = 0;
  logic [9:0] start_addr = 0, fetch_addr;
  logic active, done, fetch_req, cmd_valid, cmd_ready, tx_busy;
  logic [63:0] fetch_data;
  tx_cmd_t cmd;
  seq_entry_t mem [1024];
  int checks = 0, failures = 0;
  int cyc = 0;

  seq_fetcher dut (.*);

  always #5 clk = !clk;
  always @(posedge clk) cyc++;

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  // RAM model, one cycle latency
  always @(posedge clk) if (fetch_req) fetch_data <= mem[fetch_addr];

  // Transmitter model
  int busy_left = 0;
  int idle_since = 0;
  tx_cmd_t got [$];
  int      got_cyc [$];
  int      got_idle [$];
  assign tx_busy   = busy_left > 0;
  assign cmd_ready = !tx_busy;
  always @(posedge clk) begin
    if (cmd_valid && cmd_ready && cmd.len != 0) begin
      got.push_back(cmd); got_cyc.push_back(cyc); got_idle.push_back(idle_since);
      busy_left <= int'(cmd.len);
    end else if (busy_left > 0) begin
      busy_left <= busy_left - 1;
      if (busy_left == 1) idle_since <= cyc + 1;
    end
  end

  int ndone = 0;
  always @(posedge clk) if (done) ndone++;

  function automatic seq_entry_t e_cmd(int len, logic [31:0] d, bit last = 0);
    return '{last: last, kind: SEQ_CMD, rsvd: '0, len: 16'(len), data: d};
  endfunction
  function automatic seq_entry_t e_del(int n, bit last = 0);
    return '{last: last, kind: SEQ_DELAY, rsvd: '0, len: '0, data: 32'(n)};
  endfunction

  task automatic run(int start);
    @(negedge clk); start_addr = 10'(start); trigger = 1;
    @(negedge clk); trigger = 0;
    check(active, "active after trigger");
    while (active) @(negedge clk);
  endtask

  initial begin
    foreach (mem[i]) mem[i] = '0;
    // program 1 at 0: open gate, delay 10, close gate, cmd, delay 0, last cmd
    mem[0] = e_cmd(5, 32'h0181);
    mem[1] = e_del(10);
    mem[2] = e_cmd(3, 32'h0182);
    mem[3] = e_cmd(4, 32'h00AA);
    mem[4] = e_del(0);
    mem[5] = e_cmd(2, 32'h0003, 1);
    mem[6] = e_cmd(9, 32'hBAD);      // must never be sent
    // program 2 at 100: cmd, delay 25 (last)
    mem[100] = e_cmd(6, 32'h1234);
    mem[101] = e_del(25, 1);
    repeat (3) @(posedge clk);
    rst_n = 1;
    repeat (2) @(posedge clk);
    check(!active, "idle after reset");

    run(0);
    check(got.size() == 4, $sformatf("program 1 sent %0d commands", got.size()));
    if (got.size() == 4) begin
      check(got[0].data == 32'h0181 && got[0].len == 5, "cmd 0");
      check(got[1].data == 32'h0182 && got[1].len == 3, "cmd 1");
      check(got[2].data == 32'h00AA && got[2].len == 4, "cmd 2");
      check(got[3].data == 32'h0003 && got[3].len == 2, "cmd 3");
      check(got_cyc[1] - got_idle[1] == 10 + 3, $sformatf("delay 10 gap %0d", got_cyc[1] - got_idle[1]));
      check(got_cyc[3] - got_idle[3] == 0 + 3, $sformatf("delay 0 gap %0d", got_cyc[3] - got_idle[3]));
    end
    check(!tx_busy, "program ends after the transmitter");
    check(ndone == 1, "done pulse 1");

    got.delete(); got_cyc.delete(); got_idle.delete();
    run(100);
    check(got.size() == 1 && got[0].data == 32'h1234, "program 2 command");
    check(cyc - idle_since >= 25, "program 2 lasts past its delay");
    check(ndone == 2, "done pulse 2");
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
