// seq_ram_tb - writes random entries through the host port, reads them back on
// both the host port (readdatavalid one cycle later) and the fetch port.
module seq_ram_tb;
  import pts_pkg::*;
  localparam int DEPTH = 1024;
  logic clk = 0, rst_n = 0;
  logic [9:0] avs_address = 0, fetch_addr = 0;
  logic avs_write = 0, avs_read = 0, avs_readdatavalid, fetch_req = 0;
  logic [63:0] avs_writedata = 0, avs_readdata, fetch_data;
  logic [63:0] model [DEPTH];
  int checks = 0, failures = 0;

  seq_ram dut (.*);

  always #5 clk = !clk;

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < DEPTH; i++) begin
      @(negedge clk);
      avs_write = 1; avs_address = 10'(i); avs_writedata = {$urandom, $urandom};
      model[i] = avs_writedata;
    end
    @(negedge clk); avs_write = 0;
    for (int k = 0; k < 300; k++) begin
      int a = $urandom % DEPTH;
      int b = $urandom % DEPTH;
      @(negedge clk);
      avs_read = 1; avs_address = 10'(a); fetch_req = 1; fetch_addr = 10'(b);
      @(negedge clk);
      avs_read = 0; fetch_req = 0;
      check(avs_readdatavalid, "readdatavalid");
      check(avs_readdata == model[a], "host read");
      check(fetch_data == model[b], "fetch read");
      @(negedge clk);
      check(!avs_readdatavalid, "readdatavalid one cycle");
    end
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
