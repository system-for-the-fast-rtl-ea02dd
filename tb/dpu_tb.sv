// dpu_tb - sends groups of 16 bit-plane words through the whole DPU with random
// back-pressure, under every combination of PE bypass settings, and checks
// the decoded pixel words; then switches to raw mode and checks that raw words
// come out unchanged in bits [191:0] with out_raw set. Counts that each PE was
// both attached and bypassed.
module dpu_tb;
  import pts_pkg::*;
  logic clk = 0, rst_n = 0, raw_mode = 0;
  logic [1:0] pe_bypass = 0, pe_bypassed;
  logic in_valid = 0, in_ready, out_valid, out_ready = 0, out_raw;
  logic [191:0] in_data = 0;
  pix_word_t out_data;
  int checks = 0, failures = 0;

  dpu dut (.*);

  always #5 clk = !clk;

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  typedef struct { pix_word_t w; bit raw; } exp_t;
  exp_t expq [$];
  int nout = 0;
  always @(posedge clk) if (rst_n) begin
    out_ready <= ($urandom % 4) != 0;
    if (out_valid && out_ready) begin
      check(expq.size() > 0 && out_data == expq[0].w && out_raw == expq[0].raw,
            $sformatf("output word %0d", nout));
      if (expq.size() > 0) void'(expq.pop_front());
      nout++;
    end
  end

  task automatic put(logic [191:0] w);
    @(negedge clk); in_valid = 1; in_data = w;
    do @(posedge clk); while (!in_ready);
    @(negedge clk); in_valid = 0;
  endtask

  task automatic group();
    pix_word_t p;
    logic [191:0] plane;
    for (int c = 0; c < 192; c++) p[c] = 16'($urandom);
    expq.push_back('{w: p, raw: 0});
    for (int b = 15; b >= 0; b--) begin
      for (int c = 0; c < 192; c++) plane[c] = p[c][b];
      put(plane);
    end
  endtask

  task automatic drain();
    int n = 0;
    while (expq.size() > 0 && n < 2000) begin @(posedge clk); n++; end
    repeat (5) @(posedge clk);
  endtask

  int seen_byp [2], seen_att [2];
  always @(posedge clk) if (rst_n) for (int i = 0; i < 2; i++)
    if (pe_bypassed[i]) seen_byp[i]++; else seen_att[i]++;

  logic [191:0] r;
  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int m = 0; m < 4; m++) begin
      pe_bypass = 2'(m);
      repeat (3) group();
      drain();
      check(pe_bypassed == 2'(m), "bypass setting in force");
    end
    raw_mode = 1;
    for (int k = 0; k < 6; k++) begin
      r = {$urandom, $urandom, $urandom, $urandom, $urandom, $urandom};
      expq.push_back('{w: pix_word_t'(PIX_WORD_W'(r)), raw: 1});
      put(r);
    end
    drain();
    raw_mode = 0;
    group();
    drain();
    check(nout == 19 && expq.size() == 0, $sformatf("words out %0d", nout));
    for (int i = 0; i < 2; i++) check(seen_byp[i] > 0 && seen_att[i] > 0, "PE attached and bypassed");
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
