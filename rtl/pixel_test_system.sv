// pixel_test_system - FPGA part of a PCIe-attached readout and test system for
// a photon-counting pixel chip (192 x 64 pixels, three counters per pixel).
//
// Data path: the transceiver clocks the chip (or the built-in chip model,
// chosen by the line switch), sends it commands and deserializes its answer into
// 192-bit words; the DPU turns each 16 such bit-plane words into one word of 192
// 16-bit pixels (or passes raw words in raw mode); the DSC stores the words in
// the on-chip memory (OCM), which the host empties through the PCIe DMA engine,
// using a write/read pointer pair and an overflow flag. Control path: the host
// reaches the CSRs, the sequencer RAM and the OCM through three Avalon-MM slave
// ports, which the PCIe hard IP drives in the real system; commands reach the
// transmitter either directly from a CSR or from the sequencer, which plays a
// stored program with cycle-exact delays. The three chip lines are ports.
// The block structure and the connections between the blocks follow the system
// description; the port widths and the register map are this design's.
module pixel_test_system
  import pts_pkg::*;
#(
  parameter int unsigned SEQ_DEPTH = 1024,  // sequencer RAM entries
  parameter int unsigned OCM_AW    = 12,    // OCM address width (4096 words)
  parameter int unsigned OCM_DW    = 256,   // OCM word width
  parameter int unsigned NUM_PE    = 2,     // buffering PEs in the DPU
  parameter int unsigned PE_DEPTH  = 4,     // words per PE
  parameter int unsigned RAW_DEPTH = 4,     // words in the DPU raw buffer
  localparam int unsigned SEQ_AW   = $clog2(SEQ_DEPTH)
) (
  input  logic              clk,                 // system clock
  input  logic              rst_n,               // asynchronous reset, active low
  // CSR slave (host)
  input  logic [3:0]        csr_address,         // register word address
  input  logic              csr_read,            // read
  input  logic              csr_write,           // write
  input  logic [31:0]       csr_writedata,       // write data
  output logic [31:0]       csr_readdata,        // read data
  output logic              csr_readdatavalid,   // read data valid
  // Sequencer RAM slave (host)
  input  logic [SEQ_AW-1:0] seq_address,         // entry address
  input  logic              seq_read,            // read
  input  logic              seq_write,           // write
  input  logic [SEQ_DW-1:0] seq_writedata,       // entry to write
  output logic [SEQ_DW-1:0] seq_readdata,        // entry read
  output logic              seq_readdatavalid,   // read data valid
  // OCM slave (host / DMA engine)
  input  logic [OCM_AW-1:0] ocm_address,         // word address
  input  logic              ocm_read,            // read
  input  logic              ocm_write,           // write
  input  logic [OCM_DW-1:0] ocm_writedata,       // write data
  output logic [OCM_DW-1:0] ocm_readdata,        // read data
  output logic              ocm_readdatavalid,   // read data valid
  // Tested chip (LVDS lines)
  output logic              asic_clk,            // clock to the chip
  output logic              asic_din,            // data to the chip
  input  logic              asic_dout            // data from the chip
);

  // CSR fields
  logic               line_sel, raw_mode;
  logic [7:0]         pe_bypass, pe_bypassed;
  logic [15:0]        half_period;
  logic               csr_cmd_valid, csr_cmd_ready;
  tx_cmd_t            csr_cmd;
  logic               seq_trigger, seq_active, seq_done;
  logic [SEQ_AW-1:0]  seq_start;
  logic               rx_overrun, rx_overrun_clr, dsc_overflow, dsc_overflow_clr;
  logic [31:0]        rx_count;
  logic [OCM_AW-1:0]  dsc_wptr, dsc_rptr;

  // Transceiver
  logic               seq_cmd_valid, seq_cmd_ready, tx_busy;
  tx_cmd_t            seq_cmd;
  logic               sclk, tx_dout, rx_din;
  logic               model_clk, model_din, model_dout;
  logic               rx_valid, rx_ready;
  logic [COLS-1:0]    rx_data;

  // DPU -> DSC -> OCM
  logic               dpu_valid, dpu_ready, dpu_raw;
  pix_word_t          dpu_data;
  logic [NUM_PE-1:0]  pe_bypassed_w;
  logic [OCM_AW-1:0]  dsc_address;
  logic               dsc_write;
  logic [OCM_DW-1:0]  dsc_writedata;

  assign pe_bypassed = 8'(pe_bypassed_w);

  csr_regs #(.OCM_AW(OCM_AW), .SEQ_AW(SEQ_AW)) u_csr (
    .clk, .rst_n,
    .avs_address(csr_address), .avs_read(csr_read), .avs_write(csr_write),
    .avs_writedata(csr_writedata), .avs_readdata(csr_readdata),
    .avs_readdatavalid(csr_readdatavalid),
    .line_sel, .raw_mode, .pe_bypass, .pe_bypassed, .half_period,
    .cmd_valid(csr_cmd_valid), .cmd(csr_cmd), .cmd_ready(csr_cmd_ready), .tx_busy,
    .seq_trigger, .seq_start, .seq_active, .seq_done,
    .rx_overrun, .rx_overrun_clr, .rx_count,
    .dsc_wptr, .dsc_rptr, .dsc_overflow, .dsc_overflow_clr
  );

  sequencer #(.DEPTH(SEQ_DEPTH), .AW(SEQ_AW)) u_seq (
    .clk, .rst_n,
    .avs_address(seq_address), .avs_write(seq_write), .avs_writedata(seq_writedata),
    .avs_read(seq_read), .avs_readdata(seq_readdata),
    .avs_readdatavalid(seq_readdatavalid),
    .trigger(seq_trigger), .start_addr(seq_start), .active(seq_active),
    .done(seq_done), .cmd_valid(seq_cmd_valid), .cmd(seq_cmd),
    .cmd_ready(seq_cmd_ready), .tx_busy
  );

  transceiver u_trx (
    .clk, .rst_n, .half_period,
    .csr_cmd_valid, .csr_cmd, .csr_cmd_ready,
    .seq_active, .seq_cmd_valid, .seq_cmd, .seq_cmd_ready,
    .tx_busy, .sclk, .dout(tx_dout), .din(rx_din),
    .rx_valid, .rx_ready, .rx_data, .rx_overrun, .rx_overrun_clr, .rx_count
  );

  tx_line_switch u_switch (
    .sel(line_sel), .sclk, .dout(tx_dout), .din(rx_din),
    .asic_clk, .asic_din, .asic_dout,
    .model_clk, .model_din, .model_dout
  );

  chip_model u_model (
    .clk, .rst_n, .sclk(model_clk), .din(model_din), .dout(model_dout)
  );

  dpu #(.NUM_PE(NUM_PE), .PE_DEPTH(PE_DEPTH), .RAW_DEPTH(RAW_DEPTH)) u_dpu (
    .clk, .rst_n, .raw_mode, .pe_bypass(pe_bypass[NUM_PE-1:0]),
    .pe_bypassed(pe_bypassed_w),
    .in_valid(rx_valid), .in_ready(rx_ready), .in_data(rx_data),
    .out_valid(dpu_valid), .out_ready(dpu_ready), .out_data(dpu_data),
    .out_raw(dpu_raw)
  );

  dsc #(.AW(OCM_AW), .DW(OCM_DW)) u_dsc (
    .clk, .rst_n,
    .in_valid(dpu_valid), .in_ready(dpu_ready), .in_data(dpu_data), .in_raw(dpu_raw),
    .avm_address(dsc_address), .avm_write(dsc_write), .avm_writedata(dsc_writedata),
    .avm_waitrequest(1'b0),
    .rptr(dsc_rptr), .wptr(dsc_wptr), .overflow(dsc_overflow),
    .overflow_clr(dsc_overflow_clr)
  );

  ocm_ram #(.AW(OCM_AW), .DW(OCM_DW)) u_ocm (
    .clk, .rst_n,
    .a_address(dsc_address), .a_write(dsc_write), .a_writedata(dsc_writedata),
    .b_address(ocm_address), .b_read(ocm_read), .b_write(ocm_write),
    .b_writedata(ocm_writedata), .b_readdata(ocm_readdata),
    .b_readdatavalid(ocm_readdatavalid)
  );

endmodule
