// pixel_test_system_scan_tb - the shape of a threshold scan: several complete
// acquisitions in a row at default sizes, one per scan step, each reading all
// 64 rows of all three counters. Between steps the host empties the OCM and
// advances the read pointer, so the OCM FIFO wraps around from the second step
// on. The chip model has no discriminator threshold; each step instead loads a
// different global-register value and a different gate time, so every step's
// data differ and a stale or misplaced word is detected. Checks every pixel of
// every step, the pointers and that no overflow or overrun occurred.
module pixel_test_system_scan_tb;
  import pts_pkg::*;
  localparam int OCM_AW = 12, OCM_DW = 256, WORDS_PER_PIX = 12;

  logic clk = 0, rst_n = 0;
  logic [3:0]  csr_address = 0;
  logic        csr_read = 0, csr_write = 0, csr_readdatavalid;
  logic [31:0] csr_writedata = 0, csr_readdata;
  logic [9:0]  seq_address = 0;
  logic        seq_read = 0, seq_write = 0, seq_readdatavalid;
  logic [63:0] seq_writedata = 0, seq_readdata;
  logic [OCM_AW-1:0] ocm_address = 0;
  logic        ocm_read = 0, ocm_write = 0, ocm_readdatavalid;
  logic [OCM_DW-1:0] ocm_writedata = 0, ocm_readdata;
  logic        asic_clk, asic_din, asic_dout = 0;
  int checks = 0, failures = 0;

  pixel_test_system dut (.*);

  always #5 clk = !clk;

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic csr_wr(int a, logic [31:0] d);
    @(negedge clk); csr_write = 1; csr_address = 4'(a); csr_writedata = d;
    @(negedge clk); csr_write = 0;
  endtask
  task automatic csr_rd(int a, output logic [31:0] d);
    @(negedge clk); csr_read = 1; csr_address = 4'(a);
    @(negedge clk); csr_read = 0;
    d = csr_readdata;
  endtask
  task automatic seq_wr(int a, seq_entry_t e);
    @(negedge clk); seq_write = 1; seq_address = 10'(a); seq_writedata = e;
    @(negedge clk); seq_write = 0;
  endtask
  task automatic ocm_rd(int a, output logic [OCM_DW-1:0] d);
    @(negedge clk); ocm_read = 1; ocm_address = OCM_AW'(a);
    @(negedge clk); ocm_read = 0;
    d = ocm_readdata;
  endtask

  localparam int STEPS = 4, WORDS = COUNTERS * ROWS * WORDS_PER_PIX;
  logic [31:0] v;
  logic [OCM_DW-1:0] w;
  logic [WORDS_PER_PIX*OCM_DW-1:0] flat;
  pix_word_t p;
  int a, ev, bad, greg, delay, rptr = 0, n_wraps = 0;
  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    csr_wr(1, 1);                 // CLKDIV: chip clock = f_clk / 4
    csr_wr(0, 32'h1);             // chip model, PEs attached
    for (int s = 0; s < STEPS; s++) begin
      greg = 11 * s + 3;
      delay = 400 + 150 * s;
      a = 0;
      seq_wr(a++, '{last: 0, kind: SEQ_CMD, rsvd: '0, len: 16'(CHIP_CMD_BITS), data: chip_cmd(OP_WRITE_GREG, 8'(greg))});
      seq_wr(a++, '{last: 0, kind: SEQ_CMD, rsvd: '0, len: 16'(CHIP_CMD_BITS), data: chip_cmd(OP_CLEAR, 0)});
      seq_wr(a++, '{last: 0, kind: SEQ_CMD, rsvd: '0, len: 16'(CHIP_CMD_BITS), data: chip_cmd(OP_OPEN_GATE, 0)});
      seq_wr(a++, '{last: 0, kind: SEQ_DELAY, rsvd: '0, len: '0, data: 32'(delay)});
      seq_wr(a++, '{last: 0, kind: SEQ_CMD, rsvd: '0, len: 16'(CHIP_CMD_BITS), data: chip_cmd(OP_CLOSE_GATE, 0)});
      for (int k = 0; k < COUNTERS; k++)
        for (int r = 0; r < ROWS; r++)
          seq_wr(a++, '{last: (k == COUNTERS - 1 && r == ROWS - 1), kind: SEQ_CMD, rsvd: '0,
                        len: 16'(READ_LEN), data: chip_cmd(OP_READ, {2'(k), 6'(r)}) << 16});
      csr_wr(6, 0);
      csr_wr(5, 1);
      do csr_rd(4, v); while (v[2]);
      repeat (50) @(negedge clk);
      csr_rd(8, v);
      check(v == 32'((rptr + WORDS) % 4096), $sformatf("step %0d write pointer %0d", s, v));
      csr_rd(4, v);
      check(!v[4] && !v[3], "no overflow, no overrun");
      ev = -1;
      for (int k = 0; k < COUNTERS; k++)
        for (int r = 0; r < ROWS; r++) begin
          for (int i = 0; i < WORDS_PER_PIX; i++) begin
            ocm_rd(rptr, w);
            flat[i*OCM_DW +: OCM_DW] = w;
            rptr = (rptr + 1) % 4096;
            if (rptr == 0) n_wraps++;
          end
          p = pix_word_t'(flat[PIX_WORD_W-1:0]);
          if (ev < 0) begin
            ev = int'(p[0]) - greg;
            check(ev > delay && ev < delay + 200, $sformatf("step %0d gate count %0d", s, ev));
          end
          bad = 0;
          for (int c = 0; c < COLS; c++)
            if (p[c] != 16'(ev * (k + 1) + r * COLS + c + greg)) bad++;
          check(bad == 0, $sformatf("step %0d counter %0d row %0d: %0d wrong pixels", s, k, r, bad));
        end
      csr_wr(9, rptr);            // host has read the step
    end
    $display("scan steps=%0d OCM wraps=%0d", STEPS, n_wraps);
    check(n_wraps > 0, "OCM wrapped");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
