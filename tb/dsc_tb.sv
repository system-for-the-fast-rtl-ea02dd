// dsc_tb - data storage controller with a small OCM (32 words) modelled in the
// testbench, random waitrequest. Checks that each DPU word lands in 12 (pixel)
// or 1 (raw) consecutive OCM words with the right content, that wptr advances
// once per completed write, that a word that does not fit is dropped with the
// overflow flag set and no unread word overwritten, the flag clear, and the
// wrap-around after the host has advanced rptr.
module dsc_tb;
  import pts_pkg::*;
  localparam int AW = 5, DW = 256;
  logic clk = 0, rst_n = 0, in_valid = 0, in_ready, in_raw = 0;
  pix_word_t in_data = '0;
  logic [AW-1:0] avm_address, rptr = 0, wptr;
  logic avm_write, avm_waitrequest = 0, overflow, overflow_clr = 0;
  logic [DW-1:0] avm_writedata;
  logic [DW-1:0] ocm [32];
  int checks = 0, failures = 0, nwrites = 0;

  dsc #(.AW(AW), .DW(DW)) dut (.*);

  always #5 clk = !clk;

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  // OCM model and the rule that unread words are never overwritten
  logic [AW-1:0] wptr_q;
  always @(posedge clk) if (rst_n) begin
    avm_waitrequest <= ($urandom % 3) == 0;
    wptr_q <= wptr;
    if (avm_write && !avm_waitrequest) begin
      check(AW'(avm_address - rptr) < AW'(31), "write outside free space");
      check(avm_address == wptr, "address is write pointer");
      ocm[avm_address] <= avm_writedata;
      nwrites++;
    end
  end

  task automatic send(pix_word_t w, bit raw);
    @(negedge clk); in_valid = 1; in_data = w; in_raw = raw;
    do @(posedge clk); while (!in_ready);
    @(negedge clk); in_valid = 0;
    while (!in_ready) @(negedge clk);
  endtask

  function automatic pix_word_t rnd();
    pix_word_t p;
    for (int c = 0; c < 192; c++) p[c] = 16'($urandom);
    return p;
  endfunction

  task automatic check_stored(pix_word_t w, int at, int beats);
    logic [12*DW-1:0] flat;
    flat = (12*DW)'(w);
    for (int b = 0; b < beats; b++)
      check(ocm[(at + b) % 32] == flat[b*DW +: DW], $sformatf("OCM word %0d", (at + b) % 32));
  endtask

  pix_word_t a, b, c, d, e;
  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    a = rnd(); b = rnd(); c = rnd(); e = rnd();
    d = pix_word_t'(PIX_WORD_W'({$urandom, $urandom, $urandom, $urandom, $urandom, $urandom}));
    send(a, 0);
    check(wptr == 12 && nwrites == 12, $sformatf("wptr after 1 word %0d", wptr));
    send(b, 0);
    check(wptr == 24 && !overflow, "wptr after 2 words");
    send(c, 0);                       // 7 free words: dropped
    check(wptr == 24 && overflow, "overflow, word dropped");
    send(d, 1);                       // raw word needs 1
    check(wptr == 25, "raw word stored in one OCM word");
    check_stored(a, 0, 12);
    check_stored(b, 12, 12);
    check_stored(d, 24, 1);
    @(negedge clk); overflow_clr = 1; @(negedge clk); overflow_clr = 0;
    check(!overflow, "overflow cleared");
    rptr = 24;                        // host read 24 words
    send(e, 0);                       // wraps: 25..31, 0..4
    check(wptr == 5 && !overflow, $sformatf("wrapped wptr %0d", wptr));
    check_stored(e, 25, 12);
    check(nwrites == 37, $sformatf("transactions %0d", nwrites));
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
