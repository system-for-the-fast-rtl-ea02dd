// csr_regs - control and status registers of the test system.
//
// An Avalon-MM slave with 32-bit registers at word addresses, reached by the
// host through the PCIe BAR. Reads have a fixed latency of one cycle
// (readdatavalid). Register map (word address: contents):
//   0 CTRL       RW  [0] line select (0 ASIC, 1 model), [1] DPU raw mode,
//                    [15:8] PE bypass bits (PE i in bit 8+i)
//   1 CLKDIV     RW  [15:0] chip clock half period in system cycles, minus one
//   2 TX_DATA    RW  payload of the next direct command
//   3 TX_LEN     RW  [15:0] bit count; a write sends {TX_LEN, TX_DATA} to the
//                    transmitter (held until taken, see STATUS[1])
//   4 STATUS     R   [0] TX busy, [1] direct command pending, [2] sequencer
//                    running, [3] receiver overrun, [4] DSC overflow, [15:8] PE
//                    bypass in force; writing 1 to bit 3 or 4 clears that flag
//   5 SEQ_CTRL   W   [0] = 1 starts the sequencer (trigger pulse)
//   6 SEQ_START  RW  address of the sequencer's first entry
//   7 RX_COUNT   R   words received from the chip
//   8 DSC_WPTR   R   OCM write pointer (OCM words)
//   9 DSC_RPTR   RW  OCM read pointer, written by the host after reading
//  10 SEQ_DONE   R   sequencer programs completed
// Other addresses read as zero. The registers named by the system description
// are the clock frequency, direct transceiver control, the sequencer trigger,
// the read and write pointers, the overflow flag and the line switch; the
// addresses, bit positions and the remaining status bits are this design's.
module csr_regs
  import pts_pkg::*;
#(
  parameter int unsigned OCM_AW = 12,  // width of the OCM pointers
  parameter int unsigned SEQ_AW = 10   // width of the sequencer start address
) (
  input  logic              clk,               // system clock
  input  logic              rst_n,             // asynchronous reset, active low
  input  logic [3:0]        avs_address,       // host: register word address
  input  logic              avs_read,          // host: read
  input  logic              avs_write,         // host: write
  input  logic [31:0]       avs_writedata,     // host: write data
  output logic [31:0]       avs_readdata,      // host: read data
  output logic              avs_readdatavalid, // host: read data valid
  output logic              line_sel,          // line switch select
  output logic              raw_mode,          // DPU raw mode
  output logic [7:0]        pe_bypass,         // DPU PE bypass requests
  input  logic [7:0]        pe_bypassed,       // DPU PE bypass in force
  output logic [15:0]       half_period,       // transceiver clock setting
  output logic              cmd_valid,         // direct command pending
  output tx_cmd_t           cmd,               // direct command
  input  logic              cmd_ready,         // direct command taken
  input  logic              tx_busy,           // transmitter status
  output logic              seq_trigger,       // sequencer start pulse
  output logic [SEQ_AW-1:0] seq_start,         // sequencer first entry
  input  logic              seq_active,        // sequencer running
  input  logic              seq_done,          // sequencer end pulse
  input  logic              rx_overrun,        // receiver overrun flag
  output logic              rx_overrun_clr,    // clear it
  input  logic [31:0]       rx_count,          // received words
  input  logic [OCM_AW-1:0] dsc_wptr,          // DSC write pointer
  output logic [OCM_AW-1:0] dsc_rptr,          // DSC read pointer
  input  logic              dsc_overflow,      // DSC overflow flag
  output logic              dsc_overflow_clr   // clear it
);

  typedef enum logic [3:0] {
    R_CTRL = 4'd0, R_CLKDIV = 4'd1, R_TX_DATA = 4'd2, R_TX_LEN = 4'd3,
    R_STATUS = 4'd4, R_SEQ_CTRL = 4'd5, R_SEQ_START = 4'd6, R_RX_COUNT = 4'd7,
    R_DSC_WPTR = 4'd8, R_DSC_RPTR = 4'd9, R_SEQ_DONE = 4'd10
  } reg_e;

  logic [31:0] seq_done_count;
  logic        wr_status;

  assign wr_status        = avs_write && avs_address == R_STATUS;
  assign rx_overrun_clr   = wr_status && avs_writedata[3];
  assign dsc_overflow_clr = wr_status && avs_writedata[4];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      line_sel       <= 1'b0;
      raw_mode       <= 1'b0;
      pe_bypass      <= '0;
      half_period    <= 16'd4;
      cmd_valid      <= 1'b0;
      cmd            <= '0;
      seq_trigger    <= 1'b0;
      seq_start      <= '0;
      dsc_rptr       <= '0;
      seq_done_count <= '0;
    end else begin
      seq_trigger <= 1'b0;
      if (cmd_valid && cmd_ready) cmd_valid <= 1'b0;
      if (seq_done) seq_done_count <= seq_done_count + 1'b1;
      if (avs_write) begin
        unique case (avs_address)
          R_CTRL: begin
            line_sel  <= avs_writedata[0];
            raw_mode  <= avs_writedata[1];
            pe_bypass <= avs_writedata[15:8];
          end
          R_CLKDIV:    half_period <= avs_writedata[15:0];
          R_TX_DATA:   cmd.data    <= avs_writedata;
          R_TX_LEN: begin
            cmd.len   <= avs_writedata[CMD_LW-1:0];
            cmd_valid <= 1'b1;
          end
          R_SEQ_CTRL:  seq_trigger <= avs_writedata[0];
          R_SEQ_START: seq_start   <= avs_writedata[SEQ_AW-1:0];
          R_DSC_RPTR:  dsc_rptr    <= avs_writedata[OCM_AW-1:0];
          default: ;
        endcase
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      avs_readdata      <= '0;
      avs_readdatavalid <= 1'b0;
    end else begin
      avs_readdatavalid <= avs_read;
      if (avs_read) begin
        unique case (avs_address)
          R_CTRL:      avs_readdata <= {16'h0, pe_bypass, 6'h0, raw_mode, line_sel};
          R_CLKDIV:    avs_readdata <= {16'h0, half_period};
          R_TX_DATA:   avs_readdata <= cmd.data;
          R_TX_LEN:    avs_readdata <= {16'h0, cmd.len};
          R_STATUS:    avs_readdata <= {16'h0, pe_bypassed, 3'h0, dsc_overflow,
                                        rx_overrun, seq_active, cmd_valid, tx_busy};
          R_SEQ_START: avs_readdata <= 32'(seq_start);
          R_RX_COUNT:  avs_readdata <= rx_count;
          R_DSC_WPTR:  avs_readdata <= 32'(dsc_wptr);
          R_DSC_RPTR:  avs_readdata <= 32'(dsc_rptr);
          R_SEQ_DONE:  avs_readdata <= seq_done_count;
          default:     avs_readdata <= '0;
        endcase
      end
    end
  end

endmodule
