// dpu_decoder - format-conversion processing engine of the DPU.
//
// The chip sends its counters as bit planes: every 192-bit word carries one bit
// of each of the 192 pixels of a row, most significant plane first. The decoder
// collects PIX_BITS consecutive raw words and emits one word in which pixel c
// occupies bits [c*PIX_BITS +: PIX_BITS] (192 pixels of 16 bits): each raw word
// is shifted, bit c into pixel c, so the first plane received ends in the MSB.
// Avalon-ST in and out (valid/ready/data). The output is a register; while it
// holds an untaken word the decoder still accepts raw words up to the last
// plane of the next group. `clear` drops a partly collected group (to realign).
// The conversion from 192 raw bits to 192 16-bit pixels follows the system
// description; the bit-plane order of the raw stream is this design's reading
// of it.
module dpu_decoder
  import pts_pkg::*;
#(
  parameter int unsigned N_PIX = COLS,     // pixels per word
  parameter int unsigned PBITS = PIX_BITS  // bits per pixel (raw words per group)
) (
  input  logic                         clk,        // system clock
  input  logic                         rst_n,      // asynchronous reset, active low
  input  logic                         clear,      // restart the group count
  input  logic                         in_valid,   // raw word valid
  output logic                         in_ready,   // raw word taken
  input  logic [N_PIX-1:0]             in_data,    // raw word (one bit plane)
  output logic                         out_valid,  // pixel word valid
  input  logic                         out_ready,  // pixel word taken
  output logic [N_PIX-1:0][PBITS-1:0]  out_data    // pixel word
);

  localparam int unsigned CW = $clog2(PBITS + 1);

  logic [N_PIX-1:0][PBITS-1:0] acc, acc_next;
  logic [CW-1:0]               nplanes;
  logic                        last_plane;

  assign last_plane = (nplanes == CW'(PBITS - 1));
  assign in_ready   = !(last_plane && out_valid && !out_ready);

  always_comb begin
    for (int c = 0; c < N_PIX; c++)
      acc_next[c] = {acc[c][PBITS-2:0], in_data[c]};
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      acc       <= '0;
      nplanes   <= '0;
      out_valid <= 1'b0;
      out_data  <= '0;
    end else begin
      if (out_valid && out_ready) out_valid <= 1'b0;
      if (clear) begin
        nplanes <= '0;
      end else if (in_valid && in_ready) begin
        acc <= acc_next;
        if (last_plane) begin
          nplanes   <= '0;
          out_valid <= 1'b1;
          out_data  <= acc_next;
        end else begin
          nplanes <= nplanes + 1'b1;
        end
      end
    end
  end

endmodule
