// sequencer - programmable unit that drives the transceiver with cycle
// precision.
//
// Combines the sequencer RAM (loaded by the host over Avalon-MM) and the
// fetcher that, on a CSR trigger, plays the stored program to the transmitter:
// commands are forwarded as soon as the transmitter is free and delay entries
// insert an exact number of idle system clock cycles between two commands. See
// seq_ram and seq_fetcher for the ports' timing. The structure follows the
// system description.
module sequencer
  import pts_pkg::*;
#(
  parameter int unsigned DEPTH = 1024,          // program entries
  parameter int unsigned AW    = $clog2(DEPTH)  // address width
) (
  input  logic              clk,               // system clock
  input  logic              rst_n,             // asynchronous reset, active low
  input  logic [AW-1:0]     avs_address,       // host: entry address
  input  logic              avs_write,         // host: write strobe
  input  logic [SEQ_DW-1:0] avs_writedata,     // host: entry to write
  input  logic              avs_read,          // host: read strobe
  output logic [SEQ_DW-1:0] avs_readdata,      // host: entry read
  output logic              avs_readdatavalid, // host: avs_readdata valid
  input  logic              trigger,           // CSR: start the program
  input  logic [AW-1:0]     start_addr,        // CSR: first entry
  output logic              active,            // program running
  output logic              done,              // end-of-program pulse
  output logic              cmd_valid,         // TX: command offered
  output tx_cmd_t           cmd,               // TX: command
  input  logic              cmd_ready,         // TX: command taken
  input  logic              tx_busy            // TX status
);

  logic              fetch_req;
  logic [AW-1:0]     fetch_addr;
  logic [SEQ_DW-1:0] fetch_data;

  seq_ram #(.DEPTH(DEPTH), .AW(AW)) u_ram (
    .clk, .rst_n, .avs_address, .avs_write, .avs_writedata, .avs_read,
    .avs_readdata, .avs_readdatavalid, .fetch_req, .fetch_addr, .fetch_data
  );

  seq_fetcher #(.AW(AW)) u_fetch (
    .clk, .rst_n, .trigger, .start_addr, .active, .done, .fetch_req, .fetch_addr,
    .fetch_data, .cmd_valid, .cmd, .cmd_ready, .tx_busy
  );

endmodule
