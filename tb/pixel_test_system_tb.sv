// pixel_test_system_tb - end-to-end test of the FPGA design acting as the host
// would: it programs the CSRs and the sequencer over the Avalon-MM ports and
// empties the OCM through the host port. A second chip_model instance stands in
// for the real ASIC on the asic_* lines. Scenario:
//   1. sequencer programs "write global register, clear, open gate, delay N,
//      close gate" with N = 500 and 800: the counts must differ by exactly 300,
//      so the gate timing is cycle exact;
//   2. direct READ commands from the CSR through the whole chain (transceiver,
//      decoder, both PEs, DSC, OCM), checked pixel by pixel, with every PE
//      bypass combination;
//   3. raw mode: 16 raw bit-plane words stored one OCM word each;
//   4. OCM filled without the host reading: the overflow flag rises, the word is
//      dropped and the stored data stay intact; after the host advances the read
//      pointer, writing resumes and wraps around the OCM;
//   5. line switch to the ASIC port: the ASIC stand-in answers and the model
//      port stays quiet.
// The OCM is reduced to 64 words so that overflow and wrap-around come quickly.
// Each mechanism is counted and a mechanism that never happened is a failure.
module pixel_test_system_tb;
  import pts_pkg::*;
  localparam int OCM_AW = 6, OCM_DW = 256, WORDS_PER_PIX = 12;
  localparam int OCM_WORDS = 2 ** OCM_AW;

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
  logic        asic_clk, asic_din, asic_dout;
  int checks = 0, failures = 0;

  pixel_test_system #(.OCM_AW(OCM_AW)) dut (.*);

  // stand-in for the real chip on the ASIC lines
  chip_model asic (.clk, .rst_n, .sclk(asic_clk), .din(asic_din), .dout(asic_dout));

  always #5 clk = !clk;

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  // ---- host access -------------------------------------------------------
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

  localparam int R_CTRL = 0, R_CLKDIV = 1, R_TX_DATA = 2, R_TX_LEN = 3, R_STATUS = 4,
                 R_SEQ_CTRL = 5, R_SEQ_START = 6, R_RX_COUNT = 7, R_WPTR = 8,
                 R_RPTR = 9, R_SEQ_DONE = 10;

  // ---- mechanism counters --------------------------------------------------
  int n_seq_runs = 0, n_delay = 0, n_direct = 0, n_pe_bypassed = 0, n_pe_attached = 0,
      n_raw = 0, n_overflow = 0, n_wrap = 0, n_asic = 0, n_model = 0;
  logic model_clk_q = 0, asic_clk_q = 0;
  always @(posedge clk) if (rst_n) begin
    model_clk_q <= dut.model_clk;
    asic_clk_q  <= asic_clk;
    if (dut.model_clk && !model_clk_q) n_model++;
    if (asic_clk && !asic_clk_q) n_asic++;
    if (dut.u_seq.u_fetch.state == dut.u_seq.u_fetch.S_DELAY) n_delay++;
  end

  // ---- operations ----------------------------------------------------------
  logic [31:0] v;
  int rptr = 0;   // host copy of the read pointer

  task automatic wait_idle();
    int n = 0;
    do begin csr_rd(R_STATUS, v); n++; end while ((v[0] || v[1] || v[2]) && n < 100000);
    repeat (20) @(negedge clk);   // let the DPU and DSC finish
  endtask

  task automatic run_gate_program(int delay, int greg);
    seq_wr(0, '{last: 0, kind: SEQ_CMD, rsvd: '0, len: 16'(CHIP_CMD_BITS), data: chip_cmd(OP_WRITE_GREG, 8'(greg))});
    seq_wr(1, '{last: 0, kind: SEQ_CMD, rsvd: '0, len: 16'(CHIP_CMD_BITS), data: chip_cmd(OP_CLEAR, 0)});
    seq_wr(2, '{last: 0, kind: SEQ_CMD, rsvd: '0, len: 16'(CHIP_CMD_BITS), data: chip_cmd(OP_OPEN_GATE, 0)});
    seq_wr(3, '{last: 0, kind: SEQ_DELAY, rsvd: '0, len: '0, data: 32'(delay)});
    seq_wr(4, '{last: 1, kind: SEQ_CMD, rsvd: '0, len: 16'(CHIP_CMD_BITS), data: chip_cmd(OP_CLOSE_GATE, 0)});
    csr_wr(R_SEQ_START, 0);
    csr_wr(R_SEQ_CTRL, 1);
    wait_idle();
    n_seq_runs++;
  endtask

  task automatic direct_read(int k, int row);
    csr_wr(R_TX_DATA, chip_cmd(OP_READ, {2'(k), 6'(row)}) << 16);  // long payload: bit 31 first
    csr_wr(R_TX_LEN, READ_LEN);
    wait_idle();
    n_direct++;
  endtask

  // read one pixel word at the host read pointer, then advance it
  task automatic fetch_pixels(output pix_word_t p);
    logic [WORDS_PER_PIX*OCM_DW-1:0] flat;
    logic [OCM_DW-1:0] w;
    for (int i = 0; i < WORDS_PER_PIX; i++) begin
      ocm_rd((rptr + i) % OCM_WORDS, w);
      flat[i*OCM_DW +: OCM_DW] = w;
    end
    if (rptr + WORDS_PER_PIX >= OCM_WORDS) n_wrap++;
    rptr = (rptr + WORDS_PER_PIX) % OCM_WORDS;
    csr_wr(R_RPTR, 32'(rptr));
    p = pix_word_t'(flat[PIX_WORD_W-1:0]);
  endtask

  function automatic bit row_ok(pix_word_t p, int k, int row, int greg, int ev);
    for (int c = 0; c < COLS; c++)
      if (p[c] != 16'(ev * (k + 1) + row * COLS + c + greg)) begin
        $display("  pixel %0d: %0d expected %0d", c, p[c], 16'(ev * (k + 1) + row * COLS + c + greg));
        return 0;
      end
    return 1;
  endfunction

  pix_word_t p;
  int e500, e800, wp;
  logic [OCM_DW-1:0] w;
  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    csr_wr(R_CLKDIV, 1);
    csr_wr(R_CTRL, 32'h1);                   // model, decoder, PEs attached

    // 1. sequencer gate timing
    run_gate_program(500, 7);
    direct_read(0, 0);
    fetch_pixels(p);
    e500 = int'(p[0]) - 7;
    check(e500 >= 500 && e500 < 700, $sformatf("gate count %0d", e500));
    check(row_ok(p, 0, 0, 7, e500), "row 0 counter 0");
    run_gate_program(800, 7);
    direct_read(0, 0);
    fetch_pixels(p);
    e800 = int'(p[0]) - 7;
    check(e800 - e500 == 300, $sformatf("cycle-exact delay: %0d vs %0d", e800, e500));

    // 2. direct reads with each PE bypass combination
    for (int m = 0; m < 4; m++) begin
      csr_wr(R_CTRL, 32'h1 | (m << 8));
      direct_read(m % 3, 10 + m);
      fetch_pixels(p);
      check(row_ok(p, m % 3, 10 + m, 7, e800), $sformatf("read with bypass %0d", m));
      csr_rd(R_STATUS, v);
      check(v[9:8] == 2'(m), "bypass in force");
      if (v[8] || v[9]) n_pe_bypassed++;
      if (!v[8] || !v[9]) n_pe_attached++;
    end

    // 3. raw mode: 16 planes, one OCM word each
    csr_wr(R_CTRL, 32'h3);
    direct_read(1, 20);
    csr_rd(R_WPTR, v);
    check(int'(v) == (rptr + 16) % OCM_WORDS, "raw words stored");
    for (int b = 15; b >= 0; b--) begin
      logic [191:0] exp_plane;
      for (int c = 0; c < COLS; c++) exp_plane[c] = 16'(e800 * 2 + 20 * COLS + c + 7) >> b;
      ocm_rd(rptr, w);
      check(w[191:0] == exp_plane && w[255:192] == 0, $sformatf("raw plane %0d", b));
      rptr = (rptr + 1) % OCM_WORDS;
      n_raw++;
    end
    csr_wr(R_RPTR, 32'(rptr));
    csr_wr(R_CTRL, 32'h1);

    // 4. overflow: 63 usable words hold 5 pixel words, the 6th is dropped
    for (int i = 0; i < 6; i++) direct_read(0, 30 + i);
    csr_rd(R_STATUS, v);
    check(v[4], "overflow flag");
    if (v[4]) n_overflow++;
    csr_rd(R_WPTR, v);
    check(int'(v) == (rptr + 5 * WORDS_PER_PIX) % OCM_WORDS, "dropped word not stored");
    for (int i = 0; i < 5; i++) begin
      fetch_pixels(p);
      check(row_ok(p, 0, 30 + i, 7, e800), $sformatf("stored word %0d intact", i));
    end
    csr_wr(R_STATUS, 32'h10);
    csr_rd(R_STATUS, v);
    check(!v[4], "overflow cleared");
    for (int i = 0; i < 3; i++) begin
      direct_read(2, 40 + i);
      fetch_pixels(p);
      check(row_ok(p, 2, 40 + i, 7, e800), "after overflow");
    end

    // 5. switch to the ASIC port
    csr_wr(R_CTRL, 32'h0);
    begin
      automatic int model_edges0 = n_model;
      csr_wr(R_TX_DATA, chip_cmd(OP_WRITE_GREG, 8'd3));
      csr_wr(R_TX_LEN, CHIP_CMD_BITS);
      wait_idle();
      direct_read(1, 50);
      fetch_pixels(p);
      check(row_ok(p, 1, 50, 3, 0), "ASIC port answer");
      check(n_model == model_edges0, "model quiet while ASIC selected");
    end

    csr_rd(R_SEQ_DONE, v);
    check(v == 2, "sequencer runs counted");
    csr_rd(R_RX_COUNT, v);
    $display("mechanisms: seq_runs=%0d delay_cycles=%0d direct=%0d pe_bypassed=%0d pe_attached=%0d raw=%0d overflow=%0d wrap=%0d asic_edges=%0d model_edges=%0d rx_words=%0d",
             n_seq_runs, n_delay, n_direct, n_pe_bypassed, n_pe_attached, n_raw, n_overflow,
             n_wrap, n_asic, n_model, v);
    check(n_seq_runs > 0, "sequencer ran");
    check(n_delay > 0, "delay entry ran");
    check(n_direct > 0, "direct command ran");
    check(n_pe_bypassed > 0 && n_pe_attached > 0, "PE bypass and attach");
    check(n_raw > 0, "raw mode");
    check(n_overflow > 0, "overflow");
    check(n_wrap > 0, "OCM wrap-around");
    check(n_asic > 0 && n_model > 0, "both line switch positions");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (1000000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
