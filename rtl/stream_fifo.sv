// stream_fifo - Avalon-ST FIFO, the data-buffering processing engine.
//
// DEPTH words of WIDTH bits between an Avalon-ST sink and source (valid/ready/
// data). Data appear at the output the cycle after they are written; in_ready is
// low only when the FIFO is full. `level` tells how many words are held. Used as
// the buffering PE of the DPU pipeline and as the buffer on the DPU's raw-data
// path. Buffering as a PE follows the system description; depth and behaviour
// are this design's.
module stream_fifo #(
  parameter int unsigned WIDTH = 3072,  // word width
  parameter int unsigned DEPTH = 4      // words, a power of two
) (
  input  logic                     clk,        // system clock
  input  logic                     rst_n,      // asynchronous reset, active low
  input  logic                     in_valid,   // sink: valid
  output logic                     in_ready,   // sink: ready (not full)
  input  logic [WIDTH-1:0]         in_data,    // sink: data
  output logic                     out_valid,  // source: valid (not empty)
  input  logic                     out_ready,  // source: ready
  output logic [WIDTH-1:0]         out_data,   // source: data
  output logic [$clog2(DEPTH):0]   level       // words held
);

  localparam int unsigned AW = $clog2(DEPTH);

  logic [WIDTH-1:0] mem [DEPTH];
  logic [AW:0]      wptr, rptr;
  logic             push, pop;

  assign level     = wptr - rptr;
  assign in_ready  = (level != (AW+1)'(DEPTH));
  assign out_valid = (level != 0);
  assign out_data  = mem[rptr[AW-1:0]];
  assign push      = in_valid && in_ready;
  assign pop       = out_valid && out_ready;

  always_ff @(posedge clk) begin
    if (push) mem[wptr[AW-1:0]] <= in_data;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wptr <= '0;
      rptr <= '0;
    end else begin
      if (push) wptr <= wptr + 1'b1;
      if (pop)  rptr <= rptr + 1'b1;
    end
  end

  a_no_overflow: assert property (@(posedge clk) disable iff (!rst_n)
    level <= (AW+1)'(DEPTH));

endmodule
