// dpu_pe_slot_tb - random traffic through one PE slot while the bypass request
// is toggled at random times. Checks that no word is lost or reordered, that a
// bypassed slot is combinational (input valid appears at the output in the same
// cycle) and an attached one is not, and that both settings actually occurred.
module dpu_pe_slot_tb;
  localparam int W = 24;
  logic clk = 0, rst_n = 0, bypass = 0, bypassed;
  logic in_valid = 0, in_ready, out_valid, out_ready = 0;
  logic [W-1:0] in_data = 0, out_data;
  int checks = 0, failures = 0;

  dpu_pe_slot #(.WIDTH(W), .DEPTH(4)) dut (.*);

  always #5 clk = !clk;

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  logic [W-1:0] q [$];
  int nin = 0, nout = 0, n_byp = 0, n_att = 0, n_switch = 0;
  logic byp_q = 0;
  always @(posedge clk) if (rst_n) begin
    byp_q <= bypassed;
    if (bypassed != byp_q) n_switch++;
    if (bypassed && in_valid) begin
      check(out_valid && out_data == in_data, "bypass is a wire");
      n_byp++;
    end
    if (!bypassed && in_valid && in_ready) n_att++;
    if (in_valid && in_ready) begin q.push_back(in_data); nin++; end
    if (out_valid && out_ready) begin
      check(q.size() > 0 && out_data == q[0], "order/content");
      if (q.size() > 0) void'(q.pop_front());
      nout++;
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 3000; i++) begin
      @(negedge clk);
      if (!in_valid || in_ready) begin
        in_valid = ($urandom % 3) != 0;
        in_data  = 24'($urandom);
      end
      out_ready = ($urandom % 3) != 0;
      if ($urandom % 50 == 0) bypass = !bypass;
    end
    @(negedge clk); in_valid = 0; out_ready = 1; bypass = 0;
    repeat (10) @(negedge clk);
    check(nin == nout && q.size() == 0, $sformatf("in %0d out %0d", nin, nout));
    check(n_byp > 100 && n_att > 100 && n_switch > 10, "both settings exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
