// transceiver_tb - drives the transceiver with a chip responder built in the
// testbench: it records the bits on dout at rising sclk edges and, on falling
// edges, plays back a queued answer (a start bit and a 192-bit word). Checks a
// direct (CSR) read-style command, that a CSR command waits while the sequencer
// owns the transmitter, the received word on the Avalon-ST output and the word
// counter.
module transceiver_tb;
  import pts_pkg::*;
  logic clk = 0, rst_n = 0;
  logic [15:0] half_period = 1;
  logic csr_cmd_valid = 0, csr_cmd_ready, seq_active = 0, seq_cmd_valid = 0, seq_cmd_ready;
  tx_cmd_t csr_cmd = '0, seq_cmd = '0;
  logic tx_busy, sclk, dout, din = 0, rx_valid, rx_ready = 1, rx_overrun, rx_overrun_clr = 0;
  logic [191:0] rx_data;
  logic [31:0] rx_count;
  int checks = 0, failures = 0;

  transceiver dut (.*);

  always #5 clk = !clk;

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  // chip responder
  logic sclk_q = 0;
  bit sent [$];
  bit answer [$];
  always @(posedge clk) begin
    sclk_q <= sclk;
    if (rst_n && sclk && !sclk_q) sent.push_back(dout);
    if (rst_n && !sclk && sclk_q) din <= (answer.size() > 0) ? answer.pop_front() : 1'b0;
  end
  logic [191:0] got [$];
  always @(posedge clk) if (rst_n && rx_valid && rx_ready) got.push_back(rx_data);

  logic [191:0] w;
  logic [15:0] cmd_bits = 16'h8305;
  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    // direct command: 16 command bits, then the answer window
    w = {$urandom, $urandom, $urandom, $urandom, $urandom, $urandom};
    for (int i = 0; i < 15; i++) answer.push_back(0);  // din during command bits 2..16
    answer.push_back(1);
    for (int i = 191; i >= 0; i--) answer.push_back(w[i]);
    @(negedge clk);
    csr_cmd_valid = 1; csr_cmd = '{len: 16'(16 + 193), data: 32'h8305_0000};  // long payload: bit 31 first
    do @(posedge clk); while (!csr_cmd_ready);
    @(negedge clk); csr_cmd_valid = 0;
    while (tx_busy) @(negedge clk);
    repeat (10) @(negedge clk);
    check(sent.size() == 16 + 193, $sformatf("edges %0d", sent.size()));
    for (int i = 0; i < 16; i++) check(sent[i] == cmd_bits[15-i], $sformatf("command bit %0d: %0d", i, sent[i]));
    check(got.size() == 1 && got[0] == w, $sformatf("received word: %0d words %h vs %h", got.size(), got.size() ? got[0] : 0, w));
    check(rx_count == 1, "word count");
    // sequencer ownership: CSR command must wait
    sent.delete();
    @(negedge clk);
    seq_active = 1; seq_cmd_valid = 1; seq_cmd = '{len: 16'd4, data: 32'hA};
    csr_cmd_valid = 1; csr_cmd = '{len: 16'd3, data: 32'h7};
    #1 check(!csr_cmd_ready, "CSR not ready while sequencer active");
    @(negedge clk);
    check(!csr_cmd_ready, "CSR blocked while sequencer active");
    seq_cmd_valid = 0;
    while (tx_busy) begin check(!csr_cmd_ready, "CSR blocked"); @(negedge clk); end
    seq_active = 0;
    do @(posedge clk); while (!csr_cmd_ready);
    @(negedge clk); csr_cmd_valid = 0;
    while (tx_busy) @(negedge clk);
    repeat (10) @(negedge clk);
    check(sent.size() == 7, $sformatf("sequencer then CSR bits %0d", sent.size()));
    if (sent.size() == 7)
      check({sent[0], sent[1], sent[2], sent[3], sent[4], sent[5], sent[6]} == 7'b1010111, "bits");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
