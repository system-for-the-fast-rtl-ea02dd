// dpu_pe_slot - one position of the DPU pipeline: a buffering PE that can be
// attached to the stream or bypassed.
//
// With the PE attached, the stream passes through the PE (a stream_fifo); with it
// bypassed, the slot's input is wired straight to its output (no added latency).
// A `bypass` request from the CSR takes effect only when the PE holds no data:
// while a request to detach is pending the slot takes no new input and lets
// the PE drain, so switching never reorders or strands words. `bypassed` shows
// the setting in force. Avalon-ST in and out. Dynamic attach/bypass of PEs follows the system
// description; applying a change only when the PE is empty is this design's.
module dpu_pe_slot #(
  parameter int unsigned WIDTH = 3072,  // word width
  parameter int unsigned DEPTH = 4      // PE buffer depth
) (
  input  logic             clk,        // system clock
  input  logic             rst_n,      // asynchronous reset, active low
  input  logic             bypass,     // CSR: detach the PE
  output logic             bypassed,   // PE currently detached
  input  logic             in_valid,   // sink: valid
  output logic             in_ready,   // sink: ready
  input  logic [WIDTH-1:0] in_data,    // sink: data
  output logic             out_valid,  // source: valid
  input  logic             out_ready,  // source: ready
  output logic [WIDTH-1:0] out_data    // source: data
);

  logic                    pe_in_valid, pe_in_ready, pe_out_valid, pe_out_ready;
  logic [WIDTH-1:0]        pe_out_data;
  logic [$clog2(DEPTH):0]  pe_level;
  logic                    drain;

  assign drain = bypass && !bypassed;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)             bypassed <= 1'b0;
    else if (pe_level == 0) bypassed <= bypass;  // drain blocks pushes
  end

  stream_fifo #(.WIDTH(WIDTH), .DEPTH(DEPTH)) u_pe (
    .clk, .rst_n,
    .in_valid(pe_in_valid), .in_ready(pe_in_ready), .in_data,
    .out_valid(pe_out_valid), .out_ready(pe_out_ready), .out_data(pe_out_data),
    .level(pe_level)
  );

  always_comb begin
    pe_in_valid  = in_valid && !bypassed && !drain;
    pe_out_ready = out_ready && !bypassed;
    in_ready     = bypassed ? out_ready : (pe_in_ready && !drain);
    out_valid    = bypassed ? in_valid  : pe_out_valid;
    out_data     = bypassed ? in_data   : pe_out_data;
  end

endmodule
