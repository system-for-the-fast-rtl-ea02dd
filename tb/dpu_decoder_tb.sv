// dpu_decoder_tb - feeds random pixel values to the decoder as 16 bit-plane
// words per group (MSB plane first, bit c of a plane belongs to pixel c), with
// random stalls on both sides, and checks every decoded 192 x 16-bit word; also
// checks that `clear` realigns a partly received group.
module dpu_decoder_tb;
  import pts_pkg::*;
  logic clk = 0, rst_n = 0, clear = 0, in_valid = 0, in_ready, out_valid, out_ready = 0;
  logic [191:0] in_data = 0;
  pix_word_t out_data;
  int checks = 0, failures = 0;

  dpu_decoder dut (.*);

  always #5 clk = !clk;

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  pix_word_t expq [$];
  int nout = 0;
  always @(posedge clk) begin
    if (rst_n) out_ready <= ($urandom % 3) != 0;
    if (rst_n && out_valid && out_ready) begin
      check(expq.size() > 0 && out_data == expq[0], $sformatf("word %0d", nout));
      if (expq.size() > 0) void'(expq.pop_front());
      nout++;
    end
  end

  task automatic put(logic [191:0] w);
    @(negedge clk); in_valid = 1; in_data = w;
    do @(posedge clk); while (!in_ready);
    @(negedge clk); in_valid = 0;
    if ($urandom % 2) repeat ($urandom % 3) @(negedge clk);
  endtask

  task automatic group(pix_word_t p);
    logic [191:0] plane;
    expq.push_back(p);
    for (int b = 15; b >= 0; b--) begin
      for (int c = 0; c < 192; c++) plane[c] = p[c][b];
      put(plane);
    end
  endtask

  pix_word_t p;
  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int g = 0; g < 20; g++) begin
      for (int c = 0; c < 192; c++) p[c] = 16'($urandom);
      group(p);
    end
    // a broken group, then clear and a full one
    put({6{32'hFFFF_FFFF}}); put(0); put({6{32'h1}});
    @(negedge clk); clear = 1; @(negedge clk); clear = 0;
    for (int c = 0; c < 192; c++) p[c] = 16'(c * 257);
    group(p);
    repeat (50) @(posedge clk);
    check(nout == 21 && expq.size() == 0, $sformatf("words out %0d", nout));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
