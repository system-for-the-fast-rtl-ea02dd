// seq_ram - memory holding the sequencer's control program.
//
// A simple dual-port RAM of DEPTH 64-bit entries (pts_pkg::seq_entry_t). The host
// port is an Avalon-MM slave with writes and reads (read latency one cycle,
// readdatavalid); the fetch port follows the request/address/data triple of the
// sequencer fetcher, with data valid one cycle after the request. Both ports
// use the system clock. The RAM and its Avalon-MM host port follow the system
// description; its depth and the one-cycle latencies are this design's.
module seq_ram
  import pts_pkg::*;
#(
  parameter int unsigned DEPTH = 1024,             // entries
  parameter int unsigned AW    = $clog2(DEPTH)     // address width
) (
  input  logic              clk,              // system clock
  input  logic              rst_n,            // asynchronous reset, active low
  input  logic [AW-1:0]     avs_address,      // host: entry address
  input  logic              avs_write,        // host: write strobe
  input  logic [SEQ_DW-1:0] avs_writedata,    // host: entry to write
  input  logic              avs_read,         // host: read strobe
  output logic [SEQ_DW-1:0] avs_readdata,     // host: entry read
  output logic              avs_readdatavalid,// host: avs_readdata valid
  input  logic              fetch_req,        // fetcher: read request
  input  logic [AW-1:0]     fetch_addr,       // fetcher: entry address
  output logic [SEQ_DW-1:0] fetch_data        // fetcher: entry, one cycle later
);

  logic [SEQ_DW-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (avs_write) mem[avs_address] <= avs_writedata;
    if (avs_read)  avs_readdata     <= mem[avs_address];
    if (fetch_req) fetch_data       <= mem[fetch_addr];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) avs_readdatavalid <= 1'b0;
    else        avs_readdatavalid <= avs_read;
  end

endmodule
