// stream_fifo_tb - random valid/ready traffic through a small FIFO; checks order
// and content against a queue model, the level output, and that in_ready drops
// exactly when DEPTH words are held.
module stream_fifo_tb;
  localparam int W = 40, D = 4;
  logic clk = 0, rst_n = 0, in_valid = 0, in_ready, out_valid, out_ready = 0;
  logic [W-1:0] in_data = 0, out_data;
  logic [$clog2(D):0] level;
  int checks = 0, failures = 0;

  stream_fifo #(.WIDTH(W), .DEPTH(D)) dut (.*);

  always #5 clk = !clk;

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  logic [W-1:0] q [$];
  int nin = 0, nout = 0, nfull = 0;
  always @(posedge clk) if (rst_n) begin
    check(int'(level) == q.size(), "level");
    check(in_ready == (q.size() < D), "in_ready vs fill");
    check(out_valid == (q.size() > 0), "out_valid vs fill");
    if (!in_ready) nfull++;
    if (out_valid && out_ready) begin
      check(out_data == q[0], "order/content");
      void'(q.pop_front());
      nout++;
    end
    if (in_valid && in_ready) begin q.push_back(in_data); nin++; end
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 2000; i++) begin
      @(negedge clk);
      if (!in_valid || in_ready) begin
        in_valid = ($urandom % 2) == 1;
        in_data  = {8'($urandom), $urandom};
      end
      out_ready = (i < 1000) ? ($urandom % 4 == 0) : ($urandom % 4 != 0);
    end
    @(negedge clk); in_valid = 0; out_ready = 1;
    repeat (10) @(negedge clk);
    check(nin == nout && nin > 500, $sformatf("in %0d out %0d", nin, nout));
    check(nfull > 0, "full state reached");
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
