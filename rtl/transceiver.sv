// transceiver - link between the FPGA and the tested chip (clock, data in,
// data out).
//
// Holds the clock generator, the transmitter and the receiver. Commands reach
// the transmitter either from the CSR (software control) or from the sequencer;
// while seq_active is high the sequencer owns the transmitter and CSR commands
// wait. Received 192-bit words leave on an Avalon-ST source towards the data
// processing unit. Lines: sclk and dout go to the chip, din comes from it.
// The three sub-blocks and their CSR control follow the system description;
// the fixed-priority command selection is this design's.
module transceiver
  import pts_pkg::*;
#(
  parameter int unsigned DIV_W    = 16,   // width of the clock half-period register
  parameter int unsigned RX_WIDTH = COLS  // receiver word width
) (
  input  logic                clk,            // system clock
  input  logic                rst_n,          // asynchronous reset, active low
  input  logic [DIV_W-1:0]    half_period,    // CSR: chip clock half period - 1
  input  logic                csr_cmd_valid,  // CSR command offered
  input  tx_cmd_t             csr_cmd,        // CSR command
  output logic                csr_cmd_ready,  // CSR command accepted
  input  logic                seq_active,     // sequencer owns the transmitter
  input  logic                seq_cmd_valid,  // sequencer command offered
  input  tx_cmd_t             seq_cmd,        // sequencer command
  output logic                seq_cmd_ready,  // sequencer command accepted
  output logic                tx_busy,        // transmitter sending
  output logic                sclk,           // chip clock line
  output logic                dout,           // data line to the chip
  input  logic                din,            // data line from the chip
  output logic                rx_valid,       // Avalon-ST source: valid
  input  logic                rx_ready,       // Avalon-ST source: ready
  output logic [RX_WIDTH-1:0] rx_data,        // Avalon-ST source: data
  output logic                rx_overrun,     // sticky: received word lost
  input  logic                rx_overrun_clr, // clear rx_overrun
  output logic [31:0]         rx_count        // received words
);

  logic    rise, fall, clk_en;
  logic    cmd_valid, cmd_ready;
  tx_cmd_t cmd;

  always_comb begin
    cmd_valid     = seq_active ? seq_cmd_valid : csr_cmd_valid;
    cmd           = seq_active ? seq_cmd : csr_cmd;
    seq_cmd_ready = seq_active && cmd_ready;
    csr_cmd_ready = !seq_active && cmd_ready;
  end

  tx_clock_gen #(.DIV_W(DIV_W)) u_clkgen (
    .clk, .rst_n, .en(clk_en), .half_period, .sclk, .rise, .fall
  );

  tx_transmitter u_tx (
    .clk, .rst_n, .cmd_valid, .cmd, .cmd_ready, .fall, .clk_en, .dout,
    .busy(tx_busy)
  );

  tx_receiver #(.WIDTH(RX_WIDTH)) u_rx (
    .clk, .rst_n, .rise, .din, .out_valid(rx_valid), .out_ready(rx_ready),
    .out_data(rx_data), .overrun(rx_overrun), .overrun_clr(rx_overrun_clr),
    .word_count(rx_count)
  );

endmodule
