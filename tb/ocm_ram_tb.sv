// ocm_ram_tb - writes through port A (storage controller) and port B (host),
// reads back through port B with the one-cycle latency, and checks that a
// same-cycle write on both ports to one word leaves port B's data.
module ocm_ram_tb;
  localparam int AW = 12, DW = 256;
  logic clk = 0, rst_n = 0;
  logic [AW-1:0] a_address = 0, b_address = 0;
  logic a_write = 0, b_read = 0, b_write = 0, b_readdatavalid;
  logic [DW-1:0] a_writedata = 0, b_writedata = 0, b_readdata;
  logic [DW-1:0] model [int];
  int checks = 0, failures = 0;

  ocm_ram dut (.*);

  always #5 clk = !clk;

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  function automatic logic [DW-1:0] rnd();
    return {$urandom, $urandom, $urandom, $urandom, $urandom, $urandom, $urandom, $urandom};
  endfunction

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 400; i++) begin
      @(negedge clk);
      a_write = 1; a_address = AW'($urandom); a_writedata = rnd();
      b_write = (i % 3 == 0); b_address = AW'($urandom); b_writedata = rnd();
      if (i % 50 == 0) b_address = a_address;     // collision, port B wins
      model[a_address] = a_writedata;
      if (b_write) model[b_address] = b_writedata;
    end
    @(negedge clk); a_write = 0; b_write = 0;
    foreach (model[k]) begin
      @(negedge clk); b_read = 1; b_address = AW'(k);
      @(negedge clk); b_read = 0;
      check(b_readdatavalid && b_readdata == model[k], $sformatf("word %0d", k));
    end
    @(negedge clk);
    check(!b_readdatavalid, "readdatavalid low without read");
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
