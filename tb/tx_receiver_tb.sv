// tx_receiver_tb - feeds framed 192-bit words (start bit + data) on din with
// rise strobes, checks each delivered word and the word counter, then lets a
// word complete while the previous one is held to check the overrun flag.
module tx_receiver_tb;
  logic clk = 0, rst_n = 0, rise = 0, din = 0, out_valid, out_ready = 1;
  logic [191:0] out_data;
  logic overrun, overrun_clr = 0;
  logic [31:0] word_count;
  int checks = 0, failures = 0;

  tx_receiver dut (.*);

  always #5 clk = !clk;

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic bit_in(logic b);
    @(negedge clk); din = b; rise = 1;
    @(negedge clk); rise = 0;
    @(negedge clk);
  endtask

  task automatic word_in(logic [191:0] w, int idle);
    for (int i = 0; i < idle; i++) bit_in(0);
    bit_in(1);
    for (int i = 191; i >= 0; i--) bit_in(w[i]);
  endtask

  logic [191:0] w;
  logic [191:0] got [$];
  always @(posedge clk) if (out_valid && out_ready) got.push_back(out_data);

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int k = 0; k < 5; k++) begin
      w = {$urandom, $urandom, $urandom, $urandom, $urandom, $urandom};
      got.delete();
      word_in(w, k);
      check(got.size() == 1 && got[0] == w, "word content");
      check(word_count == 32'(k + 1), "word count");
    end
    // hold the output and receive two more words
    out_ready = 0;
    w = {6{32'h1234_5678}};
    word_in(w, 1);
    check(out_valid && out_data == w, "held word present");
    check(!overrun, "no overrun yet");
    word_in(~w, 1);
    check(overrun, "overrun flagged");
    check(out_data == w, "held word kept");
    @(negedge clk); out_ready = 1;
    @(negedge clk);
    check(!out_valid, "word taken");
    overrun_clr = 1; @(negedge clk); overrun_clr = 0;
    check(!overrun, "overrun cleared");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end


  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
