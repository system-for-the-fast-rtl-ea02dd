// ocm_ram - FPGA on-chip memory that buffers detector data for the host.
//
// 2^AW words of DW bits with two Avalon-MM slave ports on the system clock.
// Port A takes the writes of the data storage controller and never stalls, so
// it has no waitrequest. Port B
// belongs to the host side (the PCIe DMA engine): reads with a fixed latency of
// one cycle and readdatavalid, and writes. A write and a read of the same word
// on port B in one cycle return the old word. The OCM as the store between the
// DSC and the PCIe side follows the system description; its size, word width and
// latency are this design's.
module ocm_ram #(
  parameter int unsigned AW = 12,   // address width (words)
  parameter int unsigned DW = 256   // word width
) (
  input  logic          clk,               // system clock
  input  logic          rst_n,             // asynchronous reset, active low
  input  logic [AW-1:0] a_address,         // port A (DSC): address
  input  logic          a_write,           // port A: write
  input  logic [DW-1:0] a_writedata,       // port A: data
  input  logic [AW-1:0] b_address,         // port B (host): address
  input  logic          b_read,            // port B: read
  input  logic          b_write,           // port B: write
  input  logic [DW-1:0] b_writedata,       // port B: write data
  output logic [DW-1:0] b_readdata,        // port B: read data
  output logic          b_readdatavalid    // port B: read data valid
);

  logic [DW-1:0] mem [2**AW];

  // Both ports write in one process; if they hit the same word, port B wins.
  always_ff @(posedge clk) begin
    if (a_write) mem[a_address] <= a_writedata;
    if (b_write) mem[b_address] <= b_writedata;
    if (b_read)  b_readdata     <= mem[b_address];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) b_readdatavalid <= 1'b0;
    else        b_readdatavalid <= b_read;
  end

endmodule
